// tb_bist_controller: self-checking test of bist_controller (L = 8, two
// extra variables over I = 3 cycles, K = 3 subsets, D = 4, 4 seed words).
//
// The seed store is modelled here with the same one-clock read latency.
// Checks: total clock count of both phases against the formula
// pr + seeds * (1 + L + (1 + R) * (1 + K*(D+1) + K*(D+2))); the number of
// clocks in each state; the serial seed bits (most significant first); the
// extra-variable values in every fill and refill cycle; that shifts, reloads
// and captures come in the documented order; the subset advance count; the
// MISR enable count; and that no chain is clocked while the seed is loaded.
module tb_bist_controller;
  import lpbist_pkg::*;
  localparam int L = 8, V = 2, I = 3, K = 3, D = 4, DEPTH = 4;
  localparam int WIDTH = L + I * V;
  localparam int PR = 37, PRS = 5, NS = 3, R = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic start;
  logic [WIDTH-1:0] rom_word;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [1:0] rom_raddr;
  lfsr_mode_t lfsr_mode;
  logic seed_bit, shadow_cap, bist, test, chains_on, sel_init, sel_adv, wgen_adv;
  logic misr_clear, misr_en, done;
  logic [V-1:0] xv;
  logic [1:0] nact;
  phase_t phase;
  state_t state;

  bist_controller #(.L(L), .V(V), .I(I), .K(K), .D(D), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start, .pr_cycles(32'(PR)), .pr_sub_cycles(16'(PRS)),
    .num_seeds(3'(NS)), .num_reseed(8'(R)), .pr_active(2'd2), .nact, .rom_word, .rom_raddr, .lfsr_mode,
    .seed_bit, .xv, .shadow_cap, .bist, .phase, .test, .chains_on, .sel_init,
    .sel_adv, .wgen_adv, .misr_clear, .misr_en, .state, .done);

  always_ff @(posedge clk) rom_word <= mem[rom_raddr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, n_adv, n_misr, n_save, n_cap, n_fload, n_rload, n_fill, n_refill, n_pr;
    int seed_i, bitn, fillc, exp_total;
    logic [L-1:0] got_seed;
    state_t prev;
    for (int a = 0; a < DEPTH; a++) mem[a] = {$urandom, $urandom};
    start = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(state == S_IDLE && !bist, "idle after reset");
    start = 1; #1;
    check(sel_init && misr_clear && nact == 2, "start initialises subsets and MISR");
    @(posedge clk); #1 start = 0;
    cyc = 0; n_adv = 0; n_misr = 0; n_save = 0; n_cap = 0; n_fload = 0; n_rload = 0;
    n_fill = 0; n_refill = 0; n_pr = 0; seed_i = -1; bitn = 0; fillc = 0;
    prev = S_IDLE;
    while (!done && cyc < 10000) begin
      cyc++;
      n_adv  += sel_adv;
      n_misr += misr_en;
      case (state)
        S_PR: begin
          n_pr++;
          check(phase == PH_PSEUDORANDOM && chains_on && wgen_adv && lfsr_mode == LFSR_RUN, "PR outputs");
          check(sel_adv == (n_pr % PRS == 0), "PR subset switch every PRS clocks");
          check(nact == (n_pr == PR ? 1 : 2), "two subsets in phase 0, one from phase 1 on");
        end
        S_ROMRD: begin seed_i++; bitn = 0; check(!chains_on, "no chain clocked in ROMRD"); end
        S_SEED: begin
          check(lfsr_mode == LFSR_SHIN && !chains_on, "seed shift-in mode");
          check(seed_bit == mem[seed_i][L - 1 - bitn], "seed bit order");
          bitn++;
        end
        S_SAVE:  begin n_save++; check(nact == 1, "one subset in phase 1"); check(shadow_cap && !chains_on, "shadow capture"); end
        S_FLOAD: begin n_fload++; fillc = 0; check(lfsr_mode == LFSR_LOAD && !chains_on, "reload before fill"); end
        S_RLOAD: begin n_rload++; fillc = 0; check(lfsr_mode == LFSR_LOAD && !chains_on, "reload before refill"); check(prev == S_CAP, "refill follows capture"); end
        S_FILL, S_REFILL: begin
          logic [V-1:0] want;
          want = (fillc < I) ? mem[seed_i][L + fillc * V +: V] : '0;
          check(xv == want, $sformatf("extra variables cycle %0d", fillc));
          check(lfsr_mode == LFSR_RUN && chains_on && test && phase == PH_DETERMINISTIC, "shift outputs");
          check(misr_en == (state == S_REFILL), "MISR compacts refill shifts only");
          if (state == S_FILL) n_fill++; else n_refill++;
          fillc++;
        end
        S_CAP: begin n_cap++; check(chains_on && !test && lfsr_mode == LFSR_HOLD, "capture outputs"); end
        default: ;
      endcase
      prev = state;
      @(posedge clk); #1;
    end
    exp_total = PR + NS * (1 + L + (1 + R) * (1 + K * (D + 1) + K * (D + 2)));
    check(cyc == exp_total, $sformatf("total clocks %0d, expected %0d", cyc, exp_total));
    check(n_pr == PR, "PR length");
    check(n_save == NS * (R + 1), "one shadow save per round");
    check(n_fload == NS * (R + 1) * K && n_rload == NS * (R + 1) * K, "one reload per subset fill and refill");
    check(n_cap == NS * (R + 1) * K, "one capture per subset per round");
    check(n_fill == NS * (R + 1) * K * D && n_refill == n_fill, "D shifts per fill and refill");
    check(n_adv == PR / PRS + 2 * NS * (R + 1) * K, $sformatf("subset advances %0d", n_adv));
    check(n_misr == PR + NS * (R + 1) * K * D, "MISR enable count");
    check(done && !bist, "done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
