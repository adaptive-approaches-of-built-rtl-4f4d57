// seed_rom: on-chip store of the deterministic-phase seeds.
//
// Word n holds everything needed to expand deterministic vector n: the LFSR
// seed in bits [L-1:0] and, for each of the first I shift cycles of a subset
// fill, the V extra-variable values in bits [L + c*V +: V] for cycle c. The
// same word is reused for every subset and every reseeding round of that
// seed. The contents come from an offline encoder, so the array is written
// through a load port (from a tester or a boot loader) and read
// synchronously: rdata shows word raddr one clock after raddr is presented.
// The layout and the load port are this design's choices.
module seed_rom #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 42,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
