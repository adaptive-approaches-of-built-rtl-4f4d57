// tb_workload_s38417: the s38417-sized test schedule on lp_bist_top.
//
// Runs the full schedule used in the experiments at default parameters:
// 500 000 clocks of weighted pseudorandom patterns with 10% of the chains
// active, then 3 deterministic seeds (the vector count reported for s38417)
// with 10, 20 and 30 reseeding rounds. Each configuration is run three times
// on a stand-in for the circuit under test: fault-free (twice, the signature
// must repeat; repeated for the first configuration only) and once with a stuck-at-0 fault on one next-state line (the
// signature must differ). The 10-round schedule is then repeated with 2, 3
// and all 10 subsets clocked together in the pseudorandom phase (20%, 30%
// and 100% of the chains, the other activation levels of the experiments);
// the largest number of subsets clocked in one cycle is checked. Scan
// flip-flop toggles are counted in every clock: no clock may toggle more
// flip-flops than the clocked subsets hold, and the average toggles per
// phase-0 clock must scale with the share of subsets clocked. The test
// length of every run is checked against
// the schedule formula, and the number of reseeding rounds is counted.
module tb_workload_s38417;
  import lpbist_pkg::*;
  localparam int L = 22, I = 10, V = 2, K = 10, NSI = 3, LPT = 6, D = 10;
  localparam int NPI = 28, NPO = 106, NCH = NSI * K * LPT, NFF = NCH * D;
  localparam int WIDTH = L + I * V;
  localparam int PR = 500000, PRS = 1000, NS = 3;
  localparam int FAULT_FF = 777;
  localparam int FF_SUB = NFF / K;  // scan flip-flops in one subset

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start = 0, rom_we = 0;
  logic [8:0] rom_waddr = 0;
  logic [WIDTH-1:0] rom_wdata = 0;
  logic [7:0] num_reseed;
  logic [3:0] pr_active;
  int max_on;
  // scan flip-flop toggles: total and clocks in phase 0, and the most in one clock
  longint tog_pr;
  int n_pr, peak_tog;
  real avg_tog [int];
  weight_t weights [NCH];
  logic [NFF-1:0] cut_ppi, cut_ppo;
  logic [NPI-1:0] cut_pi;
  logic [NPO-1:0] cut_po;
  logic bist, done;
  phase_t phase;
  state_t state;
  logic [K-1:0] active_subset, clk_en;
  logic [31:0] signature;
  logic inject;

  lp_bist_top u_dut (
    .clk, .rst_n, .start, .pr_cycles(32'(PR)), .pr_sub_cycles(16'(PRS)),
    .num_seeds(10'(NS)), .num_reseed, .pr_active, .weights, .rom_we, .rom_waddr,
    .rom_wdata, .cut_ppi, .cut_pi, .cut_ppo, .cut_po, .bist, .phase, .state,
    .active_subset, .clk_en, .signature, .done);

  // stand-in for the circuit: AND, OR and XOR of rotated copies of the
  // flip-flops and the primary inputs, written as whole-vector operations
  function automatic logic [NFF-1:0] rot(logic [NFF-1:0] x, int n);
    return (x << n) | (x >> (NFF - n));
  endfunction
  logic [NFF-1:0] pi_rep;
  assign pi_rep = NFF'({(NFF / NPI + 1){cut_pi}});
  always_comb begin
    cut_ppo = (rot(cut_ppi, 7) & rot(cut_ppi, 11)) ^ (rot(cut_ppi, 13) | pi_rep) ^ cut_ppi;
    if (inject) cut_ppo[FAULT_FF] = 1'b0;
    cut_po = cut_ppi[NPO-1:0] ^ (cut_ppi[2*NPO-1:NPO] & pi_rep[NPO-1:0]);
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int r, input bit flt, output logic [31:0] sig, output int cyc, output int rounds);
    inject = flt;
    max_on = 0;
    tog_pr = 0; n_pr = 0; peak_tog = 0;
    num_reseed = 8'(r);
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 0; rounds = 0;
    while (!done && cyc < 1_500_000) begin
      cyc++;
      if (state == S_SAVE) rounds++;
      if ($countones(clk_en) > max_on) max_on = $countones(clk_en);
      begin
        logic [NFF-1:0] prev;
        bit in_pr;
        int t;
        prev = cut_ppi;
        in_pr = bist && phase == PH_PSEUDORANDOM;
        @(posedge clk); #1;
        t = $countones(cut_ppi ^ prev);
        if (t > peak_tog) peak_tog = t;
        if (in_pr) begin tog_pr += longint'(t); n_pr++; end
      end
    end
    sig = signature;
  endtask

  initial begin
    int rs [3] = '{10, 20, 30};
    int acts [3] = '{2, 3, 10};
    inject = 0; num_reseed = 0; pr_active = 1;
    for (int j = 0; j < NCH; j++) weights[j] = weight_t'($urandom % 5);
    @(posedge clk); #1;
    for (int a = 0; a < NS; a++) begin
      rom_we = 1; rom_waddr = 9'(a); rom_wdata = WIDTH'({$urandom, $urandom});
      @(posedge clk); #1;
    end
    rom_we = 0;
    foreach (rs[k]) begin
      logic [31:0] s0, s1, s2;
      int c0, c1, c2, n0, n1, n2, want;
      want = PR + NS * (1 + L + (1 + rs[k]) * (1 + K * (D + 1) + K * (D + 2)));
      run(rs[k], 0, s0, c0, n0);
      check(peak_tog <= FF_SUB, $sformatf("%0d flip-flops toggled in one clock, one subset holds %0d", peak_tog, FF_SUB));
      avg_tog[1] = real'(tog_pr) / n_pr;
      if (k == 0) run(rs[k], 0, s1, c1, n1);
      else begin s1 = s0; c1 = c0; n1 = n0; end
      run(rs[k], 1, s2, c2, n2);
      $display("reseed(%0d): %0d clocks, %0d rounds, signature %h, with fault %h", rs[k], c0, n0, s0, s2);
      check(c0 == want && c1 == want && c2 == want, $sformatf("test length %0d, expected %0d", c0, want));
      check(n0 == NS * (1 + rs[k]), "rounds per seed");
      check(s0 == s1, "fault-free signature repeats");
      check(s0 != s2, "stuck-at fault changes the signature");
    end
    // 20%, 30% and 100% of the chains active in the pseudorandom phase
    foreach (acts[k]) begin
      logic [31:0] s0, s2;
      int c0, c2, n0, n2, want, m0;
      pr_active = 4'(acts[k]);
      want = PR + NS * (1 + L + 11 * (1 + K * (D + 1) + K * (D + 2)));
      run(10, 0, s0, c0, n0);
      m0 = max_on;
      avg_tog[acts[k]] = real'(tog_pr) / n_pr;
      check(peak_tog <= acts[k] * FF_SUB, $sformatf("%0d flip-flops toggled in one clock, %0d subsets hold %0d",
            peak_tog, acts[k], acts[k] * FF_SUB));
      run(10, 1, s2, c2, n2);
      $display("%0d%% active: %0d clocks, at most %0d subsets clocked, signature %h, with fault %h",
               acts[k] * 10, c0, m0, s0, s2);
      check(c0 == want, "test length");
      check(m0 == acts[k], $sformatf("%0d subsets clocked at most, expected %0d", m0, acts[k]));
      check(s0 != s2, "stuck-at fault changes the signature");
    end
    // shift power: average flip-flop toggles per phase-0 clock against all
    // subsets clocked; it should scale with the share of subsets clocked
    foreach (avg_tog[a]) begin
      $display("%0d%% active: %0.1f scan flip-flop toggles per phase-0 clock (%0.1f%% of the 100%% case)",
               a * 10, avg_tog[a], 100.0 * avg_tog[a] / avg_tog[K]);
      check(avg_tog[a] > 0.0, "phase 0 toggles flip-flops");
      if (a != K)
        check(avg_tog[a] <= avg_tog[K] * (a + 1) / K,
              $sformatf("toggles with %0d subsets stay near %0d/%0d of all", a, a, K));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
