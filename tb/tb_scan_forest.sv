// tb_scan_forest: self-checking test of scan_forest (2 scan-in pins, 3
// subsets, 2 chains per tree, depth 4). A reference model holds every
// flip-flop; each cycle random scan-ins, subset enables, test-enables and
// circuit responses are applied and all flip-flops and scan-outs compared.
// Also checks that the chains of one tree hold the same data after shifting.
module tb_scan_forest;
  localparam int NSI = 2, K = 3, LPT = 2, D = 4;
  localparam int NCH = NSI * K * LPT, NFF = NCH * D;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NSI-1:0] si;
  logic [K-1:0]   en;
  logic [NCH-1:0] te, so;
  logic [NFF-1:0] ppo, ppi, m;

  scan_forest #(.NSI(NSI), .K(K), .LPT(LPT), .D(D)) dut (
    .clk, .rst_n, .si, .en, .te, .ppo, .ppi, .so);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NFF-1:0] step(logic [NFF-1:0] cur);
    logic [NFF-1:0] nx = cur;
    for (int j = 0; j < NCH; j++) begin
      int s = j / (NSI * LPT);
      int p = (j / LPT) % NSI;
      if (en[s]) begin
        if (te[j]) begin
          for (int b = D - 1; b > 0; b--) nx[j*D + b] = cur[j*D + b - 1];
          nx[j*D] = si[p];
        end else begin
          for (int b = 0; b < D; b++) nx[j*D + b] = ppo[j*D + b];
        end
      end
    end
    return nx;
  endfunction

  initial begin
    si = 0; en = 0; te = 0; ppo = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m = '0;
    for (int n = 0; n < 3000; n++) begin
      si = NSI'($urandom); en = K'(1) << ($urandom % K); te = NCH'($urandom);
      ppo = {$urandom, $urandom};
      m = step(m);
      @(posedge clk); #1;
      checks++;
      if (ppi != m) begin failures++; if (failures < 5) $display("FAIL: cycle %0d", n); end
      for (int j = 0; j < NCH; j++) begin
        checks++;
        if (so[j] != m[j*D + D - 1]) failures++;
      end
    end
    // pure shifting of subset 1: chains of one tree become equal
    en = 3'b010; te = '1;
    for (int n = 0; n < D; n++) begin
      si = NSI'($urandom);
      @(posedge clk);
    end
    #1;
    for (int p = 0; p < NSI; p++) begin
      int j0 = (1 * NSI + p) * LPT;
      checks++;
      if (ppi[j0*D +: D] != ppi[(j0+1)*D +: D]) begin failures++; $display("FAIL: tree %0d chains differ", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
