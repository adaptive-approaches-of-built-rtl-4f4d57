// tb_weight_gen: self-checking test of weight_gen.
//
// Ten chains carry the weights 0.5, 0.625, 0.75, 0.875 (two chains each) and
// test-per-scan (two chains). Over 16000 advancing cycles the fraction of
// cycles with e = 1 must be within 0.025 of each weight; test-per-scan chains
// must show exactly D ones then one zero, repeating. With adv low the outputs
// must not change.
module tb_weight_gen;
  import lpbist_pkg::*;
  localparam int NCH = 10, D = 10, N = 16000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           adv;
  weight_t        w [NCH];
  logic [NCH-1:0] e;

  weight_gen #(.NCH(NCH), .D(D)) dut (.clk, .rst_n, .adv, .w, .e);

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones [NCH];
    int tps_run;
    real frac, want;
    logic [NCH-1:0] e0;
    w = '{W_0500, W_0625, W_0750, W_0875, W_TPS, W_0500, W_0625, W_0750, W_0875, W_TPS};
    adv = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int j = 0; j < NCH; j++) ones[j] = 0;
    tps_run = 0;
    adv = 1;
    for (int n = 0; n < N; n++) begin
      #1;
      for (int j = 0; j < NCH; j++) ones[j] += e[j];
      // test-per-scan: position n mod (D+1) == D is the capture cycle
      checks++;
      if (e[4] != ((n % (D + 1)) != D) || e[9] != e[4]) begin
        failures++;
        if (failures < 5) $display("FAIL: test-per-scan enable at cycle %0d", n);
      end
      @(posedge clk);
    end
    for (int j = 0; j < NCH; j++) begin
      frac = real'(ones[j]) / N;
      want = (w[j] == W_TPS) ? real'(D) / (D + 1) : real'(weight_eighths(w[j])) / 8.0;
      checks++;
      if (frac < want - 0.025 || frac > want + 0.025) begin
        failures++;
        $display("FAIL: chain %0d shift fraction %f, weight %f", j, frac, want);
      end
    end
    // chains with the same weight must not be identical copies
    checks++;
    begin
      int diff = 0;
      adv = 1;
      for (int n = 0; n < 200; n++) begin
        @(posedge clk); #1;
        diff += (e[0] != e[5]);
      end
      if (diff == 0) begin failures++; $display("FAIL: chains 0 and 5 identical"); end
    end
    // no change without adv
    adv = 0;
    #1 e0 = e;
    repeat (20) @(posedge clk);
    #1;
    checks++; if (e != e0) begin failures++; $display("FAIL: e changed without adv"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
