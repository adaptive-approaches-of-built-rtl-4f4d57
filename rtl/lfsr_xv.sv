// lfsr_xv: external-XOR (Fibonacci) LFSR with injected extra variables.
//
// The same LFSR feeds the phase shifter in both BIST phases. Stage q[0] is the
// first stage; each cycle in RUN mode q[0] takes the XOR of the tapped stages
// and every other stage takes its predecessor. Extra variable v[j] is XORed
// into the D input of stage INJ_POS[j], so a short LFSR can encode vectors
// with more care bits than it has stages (L + i*v >= Smax).
//
// The defaults are the eight-stage example LFSR with two extra variables:
// polynomial x^8 + x^6 + x^5 + x^4 + 1 (TAPS bit t-1 set for each term x^t,
// t >= 1). In that example v1 enters at the first stage and v2 enters the
// feedback line between the x^4 and x^5 taps; the feedback line ends at the
// first stage, so both variables reach the D input of stage 0 and both
// INJ_POS entries are 0. Other configurations may inject into any stage.
//
// Modes (lpbist_pkg::lfsr_mode_t), all synchronous to clk:
//   HOLD  keep the state
//   RUN   shift with feedback and extra variables
//   SHIN  shift the seed in serially through stage 0, feedback off
//   LOAD  parallel load of load_val (the shadow register) in one cycle
// The serial seed shift-in follows the text; the extra SHIN/HOLD modes and
// the reset to state 1 are this design's choices. Reset is active low and
// synchronous.
module lfsr_xv
  import lpbist_pkg::*;
#(
  parameter int unsigned    L       = 8,
  parameter logic [L-1:0]   TAPS    = 8'b1011_1000,   // x^8, x^6, x^5, x^4
  parameter int unsigned    V       = 2,
  parameter int unsigned    INJ_POS [V] = '{0, 0}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  lfsr_mode_t       mode,
  input  logic             seed_bit,   // serial seed input (SHIN)
  input  logic [L-1:0]     load_val,   // parallel reload value (LOAD)
  input  logic [V-1:0]     xv,         // extra variables (RUN)
  output logic [L-1:0]     q
);

  logic [L-1:0] inj;     // extra-variable contribution per stage
  logic         fb;
  logic [L-1:0] nxt;

  always_comb begin
    inj = '0;
    for (int j = 0; j < V; j++) inj[INJ_POS[j]] ^= xv[j];
    fb = ^(q & TAPS);
    unique case (mode)
      LFSR_RUN:  nxt = {q[L-2:0], fb} ^ inj;
      LFSR_SHIN: nxt = {q[L-2:0], seed_bit};
      LFSR_LOAD: nxt = load_val;
      default:   nxt = q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) q <= L'(1);
    else        q <= nxt;
  end

  initial begin
    assert (L >= 2) else $fatal(1, "lfsr_xv: L must be at least 2");
    assert (TAPS[L-1]) else $fatal(1, "lfsr_xv: TAPS must contain x^L");
    for (int j = 0; j < V; j++)
      assert (INJ_POS[j] < L) else $fatal(1, "lfsr_xv: INJ_POS out of range");
  end

endmodule
