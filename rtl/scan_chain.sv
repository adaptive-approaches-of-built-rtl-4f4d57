// scan_chain: mux-D scan chain with a test-enable and a clock enable.
//
// Cell i (0 is next to the scan-in) holds one flip-flop whose D input comes
// from a multiplexer: when te = 1 it takes the previous cell's output (the
// scan-in for cell 0), a shift; when te = 0 it takes ppo[i], the circuit's
// next-state value for this flip-flop, a capture. ppi is the flip-flop
// contents seen by the circuit; so is the last cell (scan-out).
// The cells change only when `en` (the subset's gated clock) is 1 at the
// clock edge, which is how disabled chains keep constant values. Synchronous
// active-low reset to 0 is this design's choice; it gives the disabled
// chains specified values from the start.
module scan_chain #(
  parameter int unsigned D = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         te,
  input  logic         si,
  input  logic [D-1:0] ppo,
  output logic [D-1:0] ppi,
  output logic         so
);

  always_ff @(posedge clk) begin
    if (!rst_n)  ppi <= '0;
    else if (en) ppi <= te ? {ppi[D-2:0], si} : ppo;
  end

  assign so = ppi[D-1];

  initial assert (D >= 2) else $fatal(1, "scan_chain: D must be at least 2");

endmodule
