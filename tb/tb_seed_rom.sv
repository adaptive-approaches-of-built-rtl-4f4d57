// tb_seed_rom: self-checking test of seed_rom (64 words of 42 bits). Loads
// random words, then reads every address in a random order and checks the
// data appears one clock after the address.
module tb_seed_rom;
  localparam int DEPTH = 64, WIDTH = 42;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [5:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];

  seed_rom #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 6'(a); wdata = {$urandom, $urandom};
      ref_mem[a] = wdata;
      @(posedge clk);
    end
    we = 0;
    for (int n = 0; n < 300; n++) begin
      raddr = 6'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata != ref_mem[raddr]) begin failures++; $display("FAIL: addr %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
