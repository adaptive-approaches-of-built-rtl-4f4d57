// phase_shifter: XOR network between the LFSR and the scan-in signals.
//
// Every output is the XOR of three distinct LFSR stages, so neighbouring
// scan trees receive shifted copies of the m-sequence instead of the same
// bits one cycle apart. The text uses a phase shifter synthesised by an
// external tool and says each stage needs only a few XOR gates; it does not
// list the tap sets. This design picks the three stages of output o by a
// fixed formula (first tap o mod L, the other two at offsets derived from o,
// bumped until all three differ). Outputs 0..NSI-1 drive the scan-in pins of
// the scan forest, the rest drive the primary inputs of the circuit.
// Purely combinational.
module phase_shifter #(
  parameter int unsigned L    = 22,
  parameter int unsigned NOUT = 32
) (
  input  logic [L-1:0]    lfsr_q,
  output logic [NOUT-1:0] ps_out
);

  function automatic int unsigned tap(int unsigned o, int unsigned k);
    int unsigned t0, t1, t2;
    t0 = o % L;
    t1 = (t0 + 1 + (o * 5 + 3) % (L - 1)) % L;
    t2 = (t0 + 1 + (o * 11 + 7) % (L - 1)) % L;
    while (t2 == t0 || t2 == t1) t2 = (t2 + 1) % L;
    case (k)
      0:       return t0;
      1:       return t1;
      default: return t2;
    endcase
  endfunction

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    localparam int unsigned T0 = tap(o, 0);
    localparam int unsigned T1 = tap(o, 1);
    localparam int unsigned T2 = tap(o, 2);
    assign ps_out[o] = lfsr_q[T0] ^ lfsr_q[T1] ^ lfsr_q[T2];
  end

  initial assert (L >= 3) else $fatal(1, "phase_shifter: L must be at least 3");

endmodule
