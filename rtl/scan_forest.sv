// scan_forest: the scan trees of the low-power BIST architecture.
//
// Each of the NSI scan-in signals (phase-shifter outputs) drives K scan
// trees, one in each subset, and each tree is a bundle of LPT chains of depth
// D that share the scan-in, so the LPT flip-flops at one level of a tree
// receive the same value. All trees of subset s share clock enable en[s], so
// only one tree per scan-in is clocked at a time. Every chain has its own
// test-enable te[j] so that chains can be given different weights.
//
// Chain j = (s*NSI + p)*LPT + t is chain t of the tree of scan-in p in subset
// s; its flip-flop b (0 next to the scan-in) is ppi[j*D + b]. The grouping of
// trees and chains follows the text; the numbering is this design's.
module scan_forest #(
  parameter int unsigned NSI = 3,
  parameter int unsigned K   = 10,
  parameter int unsigned LPT = 6,
  parameter int unsigned D   = 10,
  localparam int unsigned NCH = NSI * K * LPT,
  localparam int unsigned NFF = NCH * D
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NSI-1:0] si,
  input  logic [K-1:0]   en,
  input  logic [NCH-1:0] te,
  input  logic [NFF-1:0] ppo,
  output logic [NFF-1:0] ppi,
  output logic [NCH-1:0] so
);

  for (genvar s = 0; s < K; s++) begin : g_sub
    for (genvar p = 0; p < NSI; p++) begin : g_tree
      for (genvar t = 0; t < LPT; t++) begin : g_chain
        localparam int unsigned J = (s * NSI + p) * LPT + t;
        scan_chain #(.D(D)) u_chain (
          .clk, .rst_n,
          .en  (en[s]),
          .te  (te[J]),
          .si  (si[p]),
          .ppo (ppo[J*D +: D]),
          .ppi (ppi[J*D +: D]),
          .so  (so[J])
        );
      end
    end
  end

endmodule
