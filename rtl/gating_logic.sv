// gating_logic: subset selection and per-chain test-enable multiplexers.
//
// The scan trees are split into K subsets and only one subset is clocked in
// any BIST cycle. A ring register R_k..R_1 (bit K-1 is R_k) names the
// active subset; at `init` it is loaded with a single 1 in R_k, as the
// register's printed initial contents "1 0 .. 0 0" show, and each `adv`
// rotates the 1 one place towards R_1, wrapping from R_1 back to R_k.
// For the pseudorandom phase the ring can also hold `nact` adjacent ones
// (R_k down to R_k-nact+1 at `init`), rotated by nact places per `adv`, so
// that nact of the K subsets (for example 2 or 3 of 10: 20% or 30% of the
// chains) run together; nact is sampled at `init` and `adv`, and values 0
// and above K act as 1 and K.
//
// clk_en[i] is the clock enable of subset i (the gated clock R'_i of the
// text). In functional mode (bist = 0) every subset runs on the functional
// clock. In BIST mode subset i is enabled when it is the selected subset and
// the controller lets chains run (`chains_on`). Here the gated clocks are
// expressed as clock enables of the scan flip-flops; an implementation with
// real gated clocks would put a latch-based clock gate (the hold latches of
// the drawing) on each enable.
//
// te[j] is the test-enable of chain j: the weighted signal e_j in the
// pseudorandom phase (phase 0) and the common `test` signal in the
// deterministic phase (phase 1), one multiplexer per chain. In functional
// mode te is 0 (the flip-flops load the circuit outputs).
// Chains are numbered subset-major: chain j belongs to subset j / CPS.
module gating_logic
  import lpbist_pkg::*;
#(
  parameter int unsigned K   = 10,
  parameter int unsigned NCH = 180,
  localparam int unsigned KW = $clog2(K + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bist,       // 1: BIST in progress
  input  phase_t         phase,
  input  logic           test,       // common test-enable of phase 1
  input  logic           chains_on,  // let the selected subset run this cycle
  input  logic           init,       // select the first subset (R_k)
  input  logic           adv,        // move to the next subset
  input  logic [KW-1:0]  nact,       // subsets active together
  input  logic [NCH-1:0] e,          // weighted test-enables of phase 0
  output logic [K-1:0]   sel,        // R_k..R_1, one-hot
  output logic [K-1:0]   clk_en,
  output logic [NCH-1:0] te
);

  int unsigned n;         // nact limited to 1..K
  logic [K-1:0] first;    // n ones from R_k down
  logic [K-1:0] rot;      // sel rotated towards R_1 by n places

  always_comb begin
    n     = (nact == '0) ? 1 : ((int'(nact) > K) ? K : int'(nact));
    first = ~({K{1'b1}} >> n);
    for (int i = 0; i < K; i++) rot[i] = sel[(i + n) % K];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      sel <= K'(1) << (K - 1);
    else if (init)   sel <= first;
    else if (adv)    sel <= rot;
  end

  always_comb begin
    clk_en = bist ? (chains_on ? sel : '0) : '1;
    if (!bist)                          te = '0;
    else if (phase == PH_DETERMINISTIC) te = {NCH{test}};
    else                                te = e;
  end

  initial assert (NCH % K == 0) else $fatal(1, "gating_logic: NCH must be a multiple of K");

endmodule
