// tb_shadow_register: self-checking test of shadow_register. Random capture
// enables and data; the register must follow a reference copy that is
// updated only on capture, and clear on reset.
module tb_shadow_register;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cap;
  logic [21:0] d, q, m;

  shadow_register #(.L(22)) dut (.clk, .rst_n, .capture(cap), .d, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ncap = 0;
    cap = 1; d = 22'h15A5A;
    @(posedge clk); #1;
    checks++; if (q != 0) failures++;
    rst_n = 1;
    m = 0;
    for (int n = 0; n < 1000; n++) begin
      cap = ($urandom % 4) == 0;
      d = 22'($urandom);
      if (cap) begin m = d; ncap++; end
      @(posedge clk); #1;
      checks++;
      if (q != m) begin failures++; $display("FAIL: q=%h expected %h", q, m); end
    end
    checks++; if (ncap == 0) failures++;
    rst_n = 0; @(posedge clk); #1;
    checks++; if (q != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
