// tb_gating_logic: self-checking test of gating_logic (K = 4 subsets, 8
// chains). Checks the initial selection of R_k, the rotation order
// R_k, R_k-1, .., R_1, R_k, the clock enables in functional mode, with and
// without chains_on, and the per-chain test-enable multiplexer in both
// phases, and the selection of several adjacent subsets at once (nact =
// 0..K, rotating by nact per advance), against values worked out here.
module tb_gating_logic;
  import lpbist_pkg::*;
  localparam int K = 4, NCH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic bist, test, chains_on, init, adv;
  phase_t phase;
  logic [NCH-1:0] e, te;
  logic [K-1:0] sel, clk_en;
  logic [2:0] nact;

  gating_logic #(.K(K), .NCH(NCH)) dut (.clk, .rst_n, .bist, .phase, .test,
    .chains_on, .init, .adv, .nact, .e, .sel, .clk_en, .te);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bist = 0; test = 0; chains_on = 0; init = 0; adv = 0; phase = PH_PSEUDORANDOM; e = '0;
    nact = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(sel == 4'b1000, "reset selects R_k");
    check(clk_en == 4'b1111 && te == '0, "functional mode: all clocked, capture");
    bist = 1; chains_on = 1;
    for (int n = 0; n < 9; n++) begin
      logic [K-1:0] want;
      want = 4'b1000 >> (n % K);
      #1 check(sel == want, $sformatf("rotation step %0d sel=%b", n, sel));
      check(clk_en == want, "only the selected subset is clocked");
      adv = 1; @(posedge clk); #1 adv = 0;
    end
    chains_on = 0; #1;
    check(clk_en == '0, "chains_on low gates every subset");
    init = 1; @(posedge clk); #1 init = 0;
    check(sel == 4'b1000, "init returns to R_k");
    chains_on = 1;
    for (int n = 0; n < 20; n++) begin
      e = NCH'($urandom); test = $urandom; phase = phase_t'($urandom % 2);
      #1;
      check(te == (phase == PH_DETERMINISTIC ? {NCH{test}} : e), "test-enable multiplexer");
    end
    // several subsets together: n adjacent ones, rotated by n per advance
    for (int n = 0; n <= K; n++) begin
      logic [K-1:0] want;
      int nn;
      nn = (n == 0) ? 1 : n;
      nact = 3'(n);
      init = 1; @(posedge clk); #1 init = 0;
      want = '0;
      for (int b = 0; b < nn; b++) want[K-1-b] = 1'b1;
      check(sel == want, $sformatf("init with %0d active: %b", n, sel));
      for (int a = 0; a < 5; a++) begin
        logic [2*K-1:0] dbl;
        dbl = {want, want} >> nn;
        want = dbl[K-1:0];
        adv = 1; @(posedge clk); #1 adv = 0;
        check(sel == want && clk_en == want, $sformatf("%0d active, step %0d: %b", n, a, sel));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
