// tb_misr: self-checking test of misr (32 bits). Compares against a
// reference built from x^32 + x^22 + x^2 + x + 1 with random inputs and
// enables; checks clear; and checks that a single flipped input bit in a
// long stream gives a different signature.
module tb_misr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, en;
  logic [31:0] d, sig, m;

  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int flip_at, output logic [31:0] s);
    clear = 1; @(posedge clk); #1 clear = 0;
    m = 0;
    for (int k = 0; k < n; k++) begin
      en = 1;
      d = 32'(k * 32'h9E37_79B9) ^ (k == flip_at ? 32'h0001_0000 : 0);
      m = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]} ^ d;
      @(posedge clk); #1;
      checks++;
      if (sig != m) failures++;
    end
    s = sig;
  endtask

  initial begin
    logic [31:0] s1, s2;
    clear = 0; en = 0; d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    checks++; if (sig != 0) failures++;
    m = 0;
    for (int n = 0; n < 2000; n++) begin
      en = $urandom; d = $urandom;
      if (en) m = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]} ^ d;
      @(posedge clk); #1;
      checks++;
      if (sig != m) begin failures++; if (failures < 5) $display("FAIL: cycle %0d", n); end
    end
    en = 0;
    run(500, -1, s1);
    run(500, 123, s2);
    checks++; if (s1 == s2) begin failures++; $display("FAIL: error not seen in signature"); end
    clear = 1; @(posedge clk); #1 clear = 0;
    checks++; if (sig != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
