// weight_gen: weighted test-enable signals e_j for the pseudorandom phase.
//
// Each scan chain j has its own weight w[j]: the probability that its
// test-enable is 1 (shift) in a cycle. The weights are the four values of the
// text, 0.5, 0.625, 0.75 and 0.875; weights below 0.5 are not offered so a
// chain never captures more often than it shifts. A chain for which no weight
// was selected uses the conventional test-per-scan enable: D shift cycles
// followed by one capture cycle (W_TPS).
//
// How the weights are produced is this design's choice: a private 31-stage
// LFSR (x^31 + x^28 + 1) steps once per `adv` cycle; chain j reads three bits,
// each the XOR of two distinct stages chosen by a formula of j, forms a
// 3-bit number r in 0..7 and sets e_j = (r < 4 + code). A counter modulo D+1,
// also stepped by `adv`, gives the test-per-scan enable (0 when it equals D).
// Outputs are combinational from the registers. Synchronous active-low reset.
module weight_gen
  import lpbist_pkg::*;
#(
  parameter int unsigned NCH = 180,
  parameter int unsigned D   = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           adv,
  input  weight_t        w [NCH],
  output logic [NCH-1:0] e
);

  localparam int unsigned RL = 31;
  localparam int unsigned CW = $clog2(D + 1);

  logic [RL-1:0] r;
  logic [CW-1:0] tps_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r       <= RL'(32'h5A5A_1234);
      tps_cnt <= '0;
    end else if (adv) begin
      r       <= {r[RL-2:0], r[30] ^ r[27]};
      tps_cnt <= (tps_cnt == CW'(D)) ? '0 : tps_cnt + 1'b1;
    end
  end

  function automatic int unsigned idx_a(int unsigned j, int unsigned t);
    return (3 * j + t) % RL;
  endfunction
  function automatic int unsigned idx_b(int unsigned j, int unsigned t);
    return (idx_a(j, t) + 1 + (7 * j + 3 * t) % (RL - 1)) % RL;
  endfunction

  for (genvar j = 0; j < NCH; j++) begin : g_ch
    logic [2:0] rnd;
    for (genvar t = 0; t < 3; t++) begin : g_bit
      assign rnd[t] = r[idx_a(j, t)] ^ r[idx_b(j, t)];
    end
    always_comb begin
      if (w[j] == W_TPS) e[j] = (tps_cnt != CW'(D));
      else               e[j] = ({1'b0, rnd} < weight_eighths(w[j]));
    end
  end

endmodule
