// tb_xor_compactor: self-checking test of xor_compactor (16 chains in 2
// subsets, 5 primary outputs, 8 MISR inputs). For random inputs each output
// bit is recomputed by collecting, per output, the chains and outputs that map
// to it. Also checks that flipping any one scan-out of the enabled subset
// flips exactly one compactor output (no aliasing inside a subset) and that
// scan-outs of a disabled subset have no effect.
module tb_xor_compactor;
  localparam int NCH = 16, K = 2, NPO = 5, W = 8, CPS = NCH / K;
  int checks = 0, failures = 0;

  logic [NCH-1:0] so;
  logic [K-1:0]   en;
  logic [NPO-1:0] po;
  logic [W-1:0]   m, m2;

  xor_compactor #(.NCH(NCH), .K(K), .NPO(NPO), .W(W)) dut (.so, .en, .po, .m);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      so = NCH'($urandom); en = K'($urandom); po = NPO'($urandom);
      #1;
      for (int b = 0; b < W; b++) begin
        logic x;
        x = 0;
        for (int s = 0; s < K; s++)
          for (int c = b; c < CPS; c += W) x ^= so[s*CPS + c] & en[s];
        for (int q = b; q < NPO; q += W) x ^= po[q];
        checks++;
        if (m[b] != x) failures++;
      end
    end
    so = NCH'($urandom); po = NPO'($urandom); en = 2'b01;
    #1 m2 = m;
    for (int j = 0; j < NCH; j++) begin
      so[j] = ~so[j];
      #1;
      checks++;
      if ($countones(m ^ m2) != (j < CPS ? 1 : 0)) begin
        failures++; $display("FAIL: flipping chain %0d changed %0d bits", j, $countones(m ^ m2));
      end
      so[j] = ~so[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
