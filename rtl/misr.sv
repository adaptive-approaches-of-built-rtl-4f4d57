// misr: multiple-input signature register.
//
// When en is 1 the register shifts one place with feedback from the tapped
// stages (external XOR) and every stage is XORed with its input bit d[i];
// when en is 0 it holds. The default width 32 and polynomial
// x^32 + x^22 + x^2 + x + 1 (TAPS bit t-1 set for term x^t) are this
// design's choice, the text gives neither. Synchronous active-low reset
// to 0; `clear` also zeroes it at the start of a test.
module misr #(
  parameter int unsigned  W    = 32,
  parameter logic [W-1:0] TAPS = 32'h8020_0003
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) sig <= '0;
    else if (en)         sig <= {sig[W-2:0], ^(sig & TAPS)} ^ d;
  end

endmodule
