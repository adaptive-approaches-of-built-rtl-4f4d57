// tb_scan_chain: self-checking test of scan_chain (D = 6). Random shift,
// capture and enable cycles against a reference array; checks the parallel
// contents and the scan-out every cycle.
module tb_scan_chain;
  localparam int D = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, te, si, so;
  logic [D-1:0] ppo, ppi, m;

  scan_chain #(.D(D)) dut (.clk, .rst_n, .en, .te, .si, .ppo, .ppi, .so);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nsh = 0, ncap = 0;
    en = 0; te = 0; si = 0; ppo = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    checks++; if (ppi != 0) failures++;
    m = 0;
    for (int n = 0; n < 2000; n++) begin
      en = ($urandom % 4) != 0; te = ($urandom % 3) != 0; si = $urandom; ppo = D'($urandom);
      if (en) begin
        if (te) begin
          for (int b = D - 1; b > 0; b--) m[b] = m[b-1];
          m[0] = si; nsh++;
        end else begin
          m = ppo; ncap++;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (ppi != m || so != m[D-1]) begin
        failures++;
        if (failures < 5) $display("FAIL: cycle %0d ppi=%b expected %b", n, ppi, m);
      end
    end
    checks++; if (nsh == 0 || ncap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
