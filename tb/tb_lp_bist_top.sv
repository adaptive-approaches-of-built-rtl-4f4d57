// tb_lp_bist_top: end-to-end test of lp_bist_top at its default parameters.
//
// A small stand-in for the circuit under test is modelled here: every
// next-state bit is an XOR of two flip-flops and one primary input, every
// primary output an XOR of two flip-flops. Random weights (all five codes)
// and random seed words are loaded, then one full test runs: a weighted
// pseudorandom phase followed by the deterministic phase with reseeding.
//
// Checked every clock: at most one subset is clocked and no flip-flop outside
// it changes (the low-power property). Checked per subset fill: the LFSR holds
// the stored seed after shift-in; the vector in every subset equals the
// vector computed here from the seed, the extra variables, the LFSR
// polynomial x^22 + x^21 + 1 (injection into stages 0 and 11) and the
// phase-shifter tap formula; all chains of a tree agree; a refill restores
// the vector; each reseeding round yields a new vector. The total clock count
// must match the schedule. Each mechanism (subset switch, weighted capture,
// test-per-scan capture, seed shift-in, shadow save, reload, fill, capture,
// refill, reseeding round, extra-variable injection, functional mode, MISR
// update) is counted and must occur.
module tb_lp_bist_top;
  import lpbist_pkg::*;
  localparam int L = 22, V = 2, I = 10, K = 10, NSI = 3, LPT = 6, D = 10;
  localparam int NPI = 28, NPO = 106, NCH = NSI * K * LPT, NFF = NCH * D;
  localparam int CPS = NSI * LPT;
  localparam int WIDTH = L + I * V;
  localparam int PR = 3000, PRS = 100, NS = 3, R = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  logic start, rom_we;
  logic [8:0] rom_waddr;
  logic [WIDTH-1:0] rom_wdata;
  weight_t weights [NCH];
  logic [NFF-1:0] cut_ppi, cut_ppo;
  logic [NPI-1:0] cut_pi;
  logic [NPO-1:0] cut_po;
  logic bist, done;
  phase_t phase;
  state_t state;
  logic [K-1:0] active_subset, clk_en;
  logic [31:0] signature;

  lp_bist_top u_dut (
    .clk, .rst_n, .start, .pr_cycles(32'(PR)), .pr_sub_cycles(16'(PRS)),
    .num_seeds(10'(NS)), .num_reseed(8'(R)), .pr_active(4'd1), .weights, .rom_we, .rom_waddr,
    .rom_wdata, .cut_ppi, .cut_pi, .cut_ppo, .cut_po, .bist, .phase, .state,
    .active_subset, .clk_en, .signature, .done);

  // stand-in for the combinational part of the circuit under test
  always_comb begin
    for (int f = 0; f < NFF; f++)
      cut_ppo[f] = cut_ppi[f] ^ cut_ppi[(f * 7 + 3) % NFF] ^ cut_pi[f % NPI];
    for (int q = 0; q < NPO; q++)
      cut_po[q] = cut_ppi[(q * 13) % NFF] ^ cut_ppi[(q * 29 + 5) % NFF];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase-shifter stage choice, as documented for the phase shifter
  function automatic int ps_tap(int o, int k);
    int t0, t1, t2;
    t0 = o % L;
    t1 = (t0 + 1 + (o * 5 + 3) % (L - 1)) % L;
    t2 = (t0 + 1 + (o * 11 + 7) % (L - 1)) % L;
    while (t2 == t0 || t2 == t1) t2 = (t2 + 1) % L;
    return k == 0 ? t0 : (k == 1 ? t1 : t2);
  endfunction

  logic [WIDTH-1:0] words [NS];

  // expected contents of tree p after D shifts from LFSR state st
  function automatic logic [D-1:0] expect_tree(logic [L-1:0] st, int p, logic [WIDTH-1:0] w);
    logic [D-1:0] r;
    logic [L-1:0] s = st;
    for (int c = 0; c < D; c++) begin
      logic [V-1:0] x;
      r = {r[D-2:0], s[ps_tap(p, 0)] ^ s[ps_tap(p, 1)] ^ s[ps_tap(p, 2)]};
      x = (c < I) ? w[L + c * V +: V] : '0;
      s = {s[L-2:0], s[L-1] ^ s[L-2]};
      s[0] ^= x[0];
      s[11] ^= x[1];
    end
    return r;
  endfunction

  function automatic int subset_of(logic [K-1:0] oh);
    for (int s = 0; s < K; s++) if (oh[s]) return s;
    return -1;
  endfunction

  initial begin
    int cyc, exp_total, seed_i, round_i;
    int n_switch, n_wcap, n_tpscap, n_shift, n_seed, n_save, n_reload, n_fill;
    int n_cap, n_refill, n_reseed, n_xv, n_func, n_misr;
    logic [NFF-1:0] prev_ppi;
    logic [K-1:0] prev_sel;
    logic [31:0] prev_sig;
    logic [L-1:0] round_seed;
    logic [D*CPS-1:0] fill_vec [K];
    logic [D*CPS-1:0] round_vec, last_round_vec;
    state_t prev_state;

    start = 0; rom_we = 0; rom_waddr = 0; rom_wdata = 0;
    for (int j = 0; j < NCH; j++) weights[j] = weight_t'($urandom % 5);
    weights[0] = W_TPS; weights[1] = W_0500;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // functional mode: every subset clocked
    check(clk_en == '1 && !bist, "functional mode clocks every subset");
    n_func = 1;
    for (int a = 0; a < NS; a++) begin
      words[a] = WIDTH'({$urandom, $urandom});
      rom_we = 1; rom_waddr = 9'(a); rom_wdata = words[a];
      @(posedge clk); #1;
    end
    rom_we = 0;
    start = 1;
    @(posedge clk); #1 start = 0;

    cyc = 0; seed_i = -1; round_i = 0;
    n_switch = 0; n_wcap = 0; n_tpscap = 0; n_shift = 0; n_seed = 0; n_save = 0;
    n_reload = 0; n_fill = 0; n_cap = 0; n_refill = 0; n_reseed = 0; n_xv = 0; n_misr = 0;
    prev_sel = active_subset; prev_sig = signature; prev_state = state;
    last_round_vec = '0; round_seed = '0;
    while (!done && cyc < 15000) begin
      int s;
      cyc++;
      prev_ppi = cut_ppi;
      s = subset_of(clk_en);
      check($countones(clk_en) <= 1, "at most one subset clocked");
      if (state == S_PR && s >= 0)
        for (int j = s * CPS; j < (s + 1) * CPS; j++) begin
          if (!u_dut.te[j]) begin
            if (weights[j] == W_TPS) n_tpscap++; else n_wcap++;
          end else n_shift++;
        end
      if (state == S_ROMRD) begin seed_i++; round_i = 0; end
      if (state == S_SEED) n_seed++;
      if (state == S_SAVE) begin
        n_save++;
        round_seed = u_dut.lfsr_q;
        if (round_i == 0) check(round_seed == words[seed_i][L-1:0], "LFSR holds the stored seed");
        else n_reseed++;
      end
      if (state == S_FLOAD || state == S_RLOAD) n_reload++;
      if (state == S_FILL) n_fill++;
      if (state == S_REFILL) n_refill++;
      if (state == S_CAP) n_cap++;
      if (u_dut.xv != 0) n_xv++;
      @(posedge clk); #1;
      // only the clocked subset may change
      for (int t = 0; t < K; t++)
        if (t != s)
          check(cut_ppi[t*CPS*D +: CPS*D] == prev_ppi[t*CPS*D +: CPS*D], "disabled subset unchanged");
      if (state == S_PR || prev_state == S_PR) if (active_subset != prev_sel && prev_state == S_PR) n_switch++;
      if (signature != prev_sig) n_misr++;
      // end of a fill or refill: compare the subset's vector
      if ((prev_state == S_FILL && state != S_FILL) || (prev_state == S_REFILL && state != S_REFILL)) begin
        logic [D*CPS-1:0] vec;
        vec = cut_ppi[s*CPS*D +: CPS*D];
        for (int p = 0; p < NSI; p++) begin
          logic [D-1:0] want;
          want = expect_tree(round_seed, p, words[seed_i]);
          for (int t = 0; t < LPT; t++)
            check(vec[(p*LPT + t)*D +: D] == want,
                  $sformatf("seed %0d round %0d subset %0d tree %0d chain %0d vector", seed_i, round_i, s, p, t));
        end
        if (prev_state == S_FILL) fill_vec[s] = vec;
        else check(vec == fill_vec[s], "refill restores the vector");
        round_vec = vec;
      end
      if (prev_state == S_REFILL && state != S_REFILL && (state == S_SAVE || state == S_ROMRD || state == S_DONE)) begin
        if (round_i > 0) check(round_vec != last_round_vec, "reseeding round gives a new vector");
        last_round_vec = round_vec;
        round_i++;
      end
      prev_sel = active_subset; prev_sig = signature; prev_state = state;
    end
    exp_total = PR + NS * (1 + L + (1 + R) * (1 + K * (D + 1) + K * (D + 2)));
    check(cyc == exp_total, $sformatf("test length %0d clocks, expected %0d", cyc, exp_total));
    check(done && !bist, "done");
    check(signature != 0, "signature non-zero");
    $display("events: subset switches %0d, weighted captures %0d, test-per-scan captures %0d, shifts %0d",
             n_switch, n_wcap, n_tpscap, n_shift);
    $display("events: seed shift-in %0d, shadow saves %0d, reloads %0d, fills %0d, captures %0d, refills %0d",
             n_seed, n_save, n_reload, n_fill, n_cap, n_refill);
    $display("events: reseeding rounds %0d, extra-variable injections %0d, functional %0d, MISR updates %0d",
             n_reseed, n_xv, n_func, n_misr);
    check(n_switch == PR / PRS, $sformatf("subset switches %0d", n_switch));
    check(n_wcap > 0, "weighted capture happened");
    check(n_tpscap > 0, "test-per-scan capture happened");
    check(n_shift > n_wcap, "shifts outnumber weighted captures");
    check(n_seed == NS * L, "seed shift-in");
    check(n_save == NS * (R + 1), "shadow saves");
    check(n_reseed == NS * R, "reseeding rounds");
    check(n_reload == 2 * NS * (R + 1) * K, "reloads");
    check(n_fill == NS * (R + 1) * K * D && n_refill == n_fill, "fills and refills");
    check(n_cap == NS * (R + 1) * K, "captures");
    check(n_xv > 0, "extra variables injected");
    check(n_func > 0, "functional mode");
    check(n_misr > 0, "MISR updated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
