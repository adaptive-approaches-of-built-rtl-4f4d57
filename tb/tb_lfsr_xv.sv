// tb_lfsr_xv: self-checking test of lfsr_xv.
//
// Instance a is the eight-stage example (x^8 + x^6 + x^5 + x^4 + 1, both
// extra variables reaching stage 0). Checks: period 255 from state 1 (the
// polynomial is primitive), cycle-by-cycle agreement with a reference
// recurrence written from the polynomial under random extra variables,
// serial seed shift-in, parallel load and hold. Instance b is a 22-stage
// LFSR (x^22 + x^21 + 1, variables into stages 0 and 11): reference
// recurrence and full period 2^22 - 1.
module tb_lfsr_xv;
  import lpbist_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  lfsr_mode_t  mode_a, mode_b;
  logic        sb_a;
  logic [7:0]  lv_a, q_a, m_a;
  logic [1:0]  xv_a, xv_b;
  logic [21:0] q_b, m_b;

  lfsr_xv u_a (.clk, .rst_n, .mode(mode_a), .seed_bit(sb_a), .load_val(lv_a),
               .xv(xv_a), .q(q_a));
  lfsr_xv #(.L(22), .TAPS(22'h30_0000), .V(2), .INJ_POS('{0, 11})) u_b (
               .clk, .rst_n, .mode(mode_b), .seed_bit(1'b0), .load_val('0),
               .xv(xv_b), .q(q_b));

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    logic [7:0] seed;
    mode_a = LFSR_HOLD; mode_b = LFSR_HOLD; sb_a = 0; lv_a = 0; xv_a = 0; xv_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(q_a == 8'd1 && q_b == 22'd1, "reset state");
    // period of the free-running example LFSR
    mode_a = LFSR_RUN;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (q_a != 8'd1 && period < 300);
    check(period == 255, $sformatf("period %0d, expected 255", period));
    // reference recurrence with random extra variables
    m_a = q_a;
    for (int n = 0; n < 1000; n++) begin
      xv_a = 2'($urandom);
      m_a = {m_a[6:0], m_a[7] ^ m_a[5] ^ m_a[4] ^ m_a[3] ^ xv_a[0] ^ xv_a[1]};
      @(posedge clk); #1;
      check(q_a == m_a, "example LFSR with extra variables");
    end
    xv_a = 0;
    // serial seed shift-in, first bit ends in the last stage
    seed = 8'hC5;
    mode_a = LFSR_SHIN;
    for (int n = 0; n < 8; n++) begin
      sb_a = seed[7 - n];
      @(posedge clk); #1;
    end
    check(q_a == seed, "seed shift-in");
    // hold
    mode_a = LFSR_HOLD;
    repeat (3) @(posedge clk);
    #1 check(q_a == seed, "hold");
    // parallel load
    mode_a = LFSR_LOAD; lv_a = 8'h3A;
    @(posedge clk); #1;
    check(q_a == 8'h3A, "parallel load");
    mode_a = LFSR_HOLD;

    // 22-stage instance: recurrence with injection at stages 0 and 11
    mode_b = LFSR_RUN;
    m_b = q_b;
    for (int n = 0; n < 1000; n++) begin
      xv_b = 2'($urandom);
      m_b = {m_b[20:0], m_b[21] ^ m_b[20]};
      m_b[0]  ^= xv_b[0];
      m_b[11] ^= xv_b[1];
      @(posedge clk); #1;
      check(q_b == m_b, "22-stage LFSR with extra variables");
    end
    xv_b = 0;
    mode_b = LFSR_LOAD;  // load_val is 0: use reset instead to restart
    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    mode_b = LFSR_RUN;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (q_b != 22'd1 && period < 4200000);
    check(period == 4194303, $sformatf("22-stage period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
