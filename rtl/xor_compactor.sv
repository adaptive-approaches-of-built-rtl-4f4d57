// xor_compactor: XOR network from scan-outs and primary outputs to the MISR.
//
// Only the chains of the clocked subset carry responses, so each scan-out is
// first masked with its subset's clock enable; the disabled chains hold
// constants and would only add a fixed bias. Within a subset, chain j goes to
// MISR input (j mod CPS) mod W, where CPS = NCH/K chains per subset: when
// CPS <= W no two chains of one subset meet in the same XOR, so a single
// erroneous scan-out bit always reaches the MISR. Primary output q goes to
// input q mod W. The text asks for a compactor with zero aliasing obtained by
// careful connection but gives no connection list; this mapping is this
// design's. Purely combinational.
module xor_compactor #(
  parameter int unsigned NCH = 180,
  parameter int unsigned K   = 10,
  parameter int unsigned NPO = 106,
  parameter int unsigned W   = 32
) (
  input  logic [NCH-1:0] so,
  input  logic [K-1:0]   en,
  input  logic [NPO-1:0] po,
  output logic [W-1:0]   m
);

  localparam int unsigned CPS = NCH / K;

  always_comb begin
    m = '0;
    for (int j = 0; j < NCH; j++) m[(j % CPS) % W] ^= so[j] & en[j / CPS];
    for (int q = 0; q < NPO; q++) m[q % W] ^= po[q];
  end

endmodule
