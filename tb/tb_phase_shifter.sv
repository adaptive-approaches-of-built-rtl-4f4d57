// tb_phase_shifter: self-checking test of phase_shifter (L = 22, 32
// outputs). Driving one LFSR stage at a time recovers the stage set of every
// output: each must use exactly three stages, no two outputs may share a set
// (otherwise two scan trees would receive identical streams), every stage
// must feed some output, and random inputs must give the XOR-linear result.
module tb_phase_shifter;
  localparam int L = 22, N = 32;
  int checks = 0, failures = 0;

  logic [L-1:0] q;
  logic [N-1:0] o;
  logic [L-1:0] cols [N];

  phase_shifter #(.L(L), .NOUT(N)) dut (.lfsr_q(q), .ps_out(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] used;
    for (int k = 0; k < N; k++) cols[k] = '0;
    for (int s = 0; s < L; s++) begin
      q = L'(1) << s;
      #1;
      for (int k = 0; k < N; k++) cols[k][s] = o[k];
    end
    used = '0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if ($countones(cols[k]) != 3) begin
        failures++; $display("FAIL: output %0d uses %0d stages", k, $countones(cols[k]));
      end
      used |= cols[k];
      for (int m = 0; m < k; m++) begin
        checks++;
        if (cols[m] == cols[k]) begin failures++; $display("FAIL: outputs %0d and %0d equal", m, k); end
      end
    end
    checks++; if (used != '1) failures++;
    for (int n = 0; n < 500; n++) begin
      q = L'($urandom);
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (o[k] != ^(q & cols[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
