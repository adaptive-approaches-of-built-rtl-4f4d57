// shadow_register: copy of the LFSR seed for single-cycle reloads.
//
// In the deterministic phase the same seed (and the same extra-variable
// values) is expanded once per subset of scan trees, so the seed must be
// restored into the LFSR before each subset is filled. The register samples
// the LFSR state when `capture` is high at a clock edge and holds it
// otherwise; `q` drives the LFSR's parallel reload input. It is as wide as
// the LFSR, as the text states. Sampling the LFSR (rather than the ROM) lets
// the reseeding rounds keep the LFSR's final state as their new seed. The
// synchronous active-low clear is this design's choice.
module shadow_register #(
  parameter int unsigned L = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         capture,
  input  logic [L-1:0] d,
  output logic [L-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)       q <= '0;
    else if (capture) q <= d;
  end

endmodule
