// lp_bist_top: low-power scan BIST with weighted test-enables and reseeding.
//
// One LFSR with injected extra variables drives a phase shifter whose
// outputs feed the scan-in pins of a scan forest and the primary inputs of
// the circuit under test. The scan trees are split into K subsets and only
// one subset is clocked per cycle, so at most 1/K of the scan flip-flops
// switch in any cycle (10% with the default K = 10; phase 0 can be run with
// pr_active subsets together, e.g. 2 or 3 for 20% or 30%). Phase 0 applies
// weighted pseudorandom patterns, every chain with its own test-enable
// weight; phase 1 expands seeds from the seed ROM into deterministic vectors,
// reloading the seed from the shadow register for every subset, and then
// reuses each seed for num_reseed reseeding rounds. Scan-outs and primary
// outputs are compacted by an XOR network into a MISR.
//
// The combinational part of the circuit under test is outside this module:
// cut_ppi/cut_pi go to it and cut_ppo/cut_po come back (same cycle). Flip-flop
// b of chain j is bit j*D + b of cut_ppi/cut_ppo; chain j belongs to subset
// j / (NSI*LPT). Weights and run lengths are run-time inputs, expected stable
// while the test runs; the seed ROM is loaded through rom_we/rom_waddr/
// rom_wdata before start. In functional mode (no test running) every
// flip-flop loads cut_ppo each clock.
//
// Defaults: K = 10 subsets (10% of the chains active) and scan depth D = 10
// as in the main experiments; LFSR degree 22, 28 PIs and 106 POs are the
// figures reported for the s38417 benchmark. The polynomial x^22 + x^21 + 1,
// 3 scan-in pins, 6 chains per tree (180 chains, 1800 scan flip-flops, room
// for the 1636 of s38417), two extra variables injected in the first 10 shift
// cycles, a 32-bit MISR and a 512-word seed store are this design's choices.
module lp_bist_top
  import lpbist_pkg::*;
#(
  parameter int unsigned  L       = 22,
  parameter logic [L-1:0] TAPS    = 22'h30_0000,   // x^22 + x^21 + 1
  parameter int unsigned  V       = 2,
  parameter int unsigned  INJ_POS [V] = '{0, 11},
  parameter int unsigned  I       = 10,
  parameter int unsigned  K       = 10,
  parameter int unsigned  NSI     = 3,
  parameter int unsigned  LPT     = 6,
  parameter int unsigned  D       = 10,
  parameter int unsigned  NPI     = 28,
  parameter int unsigned  NPO     = 106,
  parameter int unsigned  MW      = 32,
  parameter int unsigned  DEPTH   = 512,
  localparam int unsigned NCH     = NSI * K * LPT,
  localparam int unsigned NFF     = NCH * D,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned WIDTH   = L + I * V,
  localparam int unsigned KW      = $clog2(K + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // run control
  input  logic             start,
  input  logic [31:0]      pr_cycles,      // length of phase 0
  input  logic [15:0]      pr_sub_cycles,  // clocks per subset in phase 0
  input  logic [AW:0]      num_seeds,      // seed words used in phase 1
  input  logic [7:0]       num_reseed,     // reseeding rounds per seed
  input  logic [KW-1:0]    pr_active,      // subsets clocked together in phase 0
  input  weight_t          weights [NCH],  // test-enable weight per chain
  // seed store load port
  input  logic             rom_we,
  input  logic [AW-1:0]    rom_waddr,
  input  logic [WIDTH-1:0] rom_wdata,
  // circuit under test
  output logic [NFF-1:0]   cut_ppi,
  output logic [NPI-1:0]   cut_pi,
  input  logic [NFF-1:0]   cut_ppo,
  input  logic [NPO-1:0]   cut_po,
  // status
  output logic             bist,
  output phase_t           phase,
  output state_t           state,
  output logic [K-1:0]     active_subset,  // R_k..R_1, one-hot
  output logic [K-1:0]     clk_en,
  output logic [MW-1:0]    signature,
  output logic             done
);

  lfsr_mode_t       lfsr_mode;
  logic             seed_bit;
  logic [V-1:0]     xv;
  logic [L-1:0]     lfsr_q, shadow_q;
  logic             shadow_cap;
  logic [NSI+NPI-1:0] ps_out;
  logic [NCH-1:0]   e, te, so;
  logic             test, chains_on, sel_init, sel_adv, wgen_adv;
  logic [KW-1:0]    nact;
  logic             misr_clear, misr_en;
  logic [MW-1:0]    comp;
  logic [AW-1:0]    rom_raddr;
  logic [WIDTH-1:0] rom_word;

  bist_controller #(.L(L), .V(V), .I(I), .K(K), .D(D), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .pr_cycles, .pr_sub_cycles, .num_seeds, .num_reseed,
    .pr_active, .nact,
    .rom_word, .rom_raddr, .lfsr_mode, .seed_bit, .xv, .shadow_cap,
    .bist, .phase, .test, .chains_on, .sel_init, .sel_adv, .wgen_adv,
    .misr_clear, .misr_en, .state, .done
  );

  seed_rom #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_rom (
    .clk, .we(rom_we), .waddr(rom_waddr), .wdata(rom_wdata),
    .raddr(rom_raddr), .rdata(rom_word)
  );

  lfsr_xv #(.L(L), .TAPS(TAPS), .V(V), .INJ_POS(INJ_POS)) u_lfsr (
    .clk, .rst_n, .mode(lfsr_mode), .seed_bit, .load_val(shadow_q), .xv,
    .q(lfsr_q)
  );

  shadow_register #(.L(L)) u_shadow (
    .clk, .rst_n, .capture(shadow_cap), .d(lfsr_q), .q(shadow_q)
  );

  phase_shifter #(.L(L), .NOUT(NSI + NPI)) u_ps (
    .lfsr_q, .ps_out
  );

  weight_gen #(.NCH(NCH), .D(D)) u_wgen (
    .clk, .rst_n, .adv(wgen_adv), .w(weights), .e
  );

  gating_logic #(.K(K), .NCH(NCH)) u_gate (
    .clk, .rst_n, .bist, .phase, .test, .chains_on, .init(sel_init),
    .adv(sel_adv), .nact, .e, .sel(active_subset), .clk_en, .te
  );

  scan_forest #(.NSI(NSI), .K(K), .LPT(LPT), .D(D)) u_forest (
    .clk, .rst_n, .si(ps_out[NSI-1:0]), .en(clk_en), .te,
    .ppo(cut_ppo), .ppi(cut_ppi), .so
  );

  assign cut_pi = ps_out[NSI +: NPI];

  xor_compactor #(.NCH(NCH), .K(K), .NPO(NPO), .W(MW)) u_comp (
    .so, .en(clk_en), .po(cut_po), .m(comp)
  );

  misr #(.W(MW)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en), .d(comp), .sig(signature)
  );

endmodule
