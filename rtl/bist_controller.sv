// bist_controller: sequencing of the two low-power BIST phases.
//
// Phase 0, weighted pseudorandom testing: for pr_cycles clocks the LFSR runs
// freely, the selected subset of scan trees is clocked and each of its chains
// shifts or captures according to its weighted test-enable; every
// pr_sub_cycles clocks the next subset is selected, wrapping after the last,
// until the cycle budget is spent. The MISR compacts every cycle.
// pr_active subsets (normally 1) are clocked together in phase 0, to run
// with 20% or 30% of the chains active; phase 1 always uses one subset.
//
// Phase 1, deterministic BIST with reseeding, for each of num_seeds words of
// the seed ROM:
//   ROMRD   read the word (1 clock)
//   SEED    shift the seed into the LFSR (L clocks)
//   then 1 + num_reseed rounds, each:
//   SAVE    shadow register <= LFSR (1 clock)
//   for each subset: FLOAD (LFSR <= shadow, 1 clock), FILL (D shift clocks,
//           extra variables of the word injected in the first I of them)
//   for each subset: CAP (capture, 1 clock), RLOAD (1 clock), REFILL (D shift
//           clocks refilling the same vector while the responses go to the
//           MISR)
// Round 0 expands the stored seed; a reseeding round starts from whatever the
// LFSR holds after the previous round and injects the same extra-variable
// values, so further vectors come without further ROM bits. A seed word thus
// takes 1 + L + (1 + num_reseed) * (1 + K*(D+1) + K*(D+2)) clocks and the
// pseudorandom phase pr_cycles clocks; done rises the clock after the last.
//
// The order of fill, capture and refill per subset and the reuse of the
// extra-variable values follow the text; the separate reload clocks, the
// per-cycle layout of the extra variables and the choice to compact only
// refill shifts in phase 1 are this design's. `start` is sampled in IDLE and
// DONE. Synchronous active-low reset.
module bist_controller
  import lpbist_pkg::*;
#(
  parameter int unsigned L     = 22,
  parameter int unsigned V     = 2,
  parameter int unsigned I     = 10,
  parameter int unsigned K     = 10,
  parameter int unsigned D     = 10,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned WIDTH = L + I * V,
  localparam int unsigned KW    = $clog2(K + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [31:0]      pr_cycles,
  input  logic [15:0]      pr_sub_cycles,
  input  logic [AW:0]      num_seeds,
  input  logic [7:0]       num_reseed,
  input  logic [KW-1:0]    pr_active,   // subsets clocked together in phase 0
  input  logic [WIDTH-1:0] rom_word,
  output logic [AW-1:0]    rom_raddr,
  output lfsr_mode_t       lfsr_mode,
  output logic             seed_bit,
  output logic [V-1:0]     xv,
  output logic             shadow_cap,
  output logic             bist,
  output phase_t           phase,
  output logic             test,
  output logic             chains_on,
  output logic             sel_init,
  output logic             sel_adv,
  output logic [KW-1:0]    nact,        // subsets per ring step (gating logic)
  output logic             wgen_adv,
  output logic             misr_clear,
  output logic             misr_en,
  output state_t           state,
  output logic             done
);

  localparam int unsigned CW = $clog2((L > D ? L : D) + 1);

  logic [31:0]   pr_cnt;
  logic [15:0]   sub_cyc;
  logic [CW-1:0] cnt;
  logic [KW-1:0] sub;
  logic [7:0]    round;
  logic [AW:0]   seed;

  logic last_sub;
  int unsigned xcyc;   // shift cycle whose extra variables are injected
  assign xcyc = (int'(cnt) < I) ? int'(cnt) : 0;
  assign last_sub = (sub == KW'(K - 1));

  // ---------------- next state and counters ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pr_cnt  <= '0;
      sub_cyc <= '0;
      cnt     <= '0;
      sub     <= '0;
      round   <= '0;
      seed    <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          pr_cnt  <= '0;
          sub_cyc <= '0;
          seed    <= '0;
          if (pr_cycles != 0)      state <= S_PR;
          else if (num_seeds != 0) state <= S_ROMRD;
          else                     state <= S_DONE;
        end
        S_PR: begin
          pr_cnt  <= pr_cnt + 1;
          sub_cyc <= (sub_cyc == pr_sub_cycles - 16'd1) ? '0 : sub_cyc + 16'd1;
          if (pr_cnt == pr_cycles - 1)
            state <= (num_seeds != 0) ? S_ROMRD : S_DONE;
        end
        S_ROMRD: begin
          cnt   <= '0;
          state <= S_SEED;
        end
        S_SEED: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(L - 1)) begin
            round <= '0;
            state <= S_SAVE;
          end
        end
        S_SAVE: begin
          sub   <= '0;
          state <= S_FLOAD;
        end
        S_FLOAD: begin
          cnt   <= '0;
          state <= S_FILL;
        end
        S_FILL: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(D - 1)) begin
            sub   <= last_sub ? '0 : sub + 1'b1;
            state <= last_sub ? S_CAP : S_FLOAD;
          end
        end
        S_CAP:   state <= S_RLOAD;
        S_RLOAD: begin
          cnt   <= '0;
          state <= S_REFILL;
        end
        S_REFILL: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(D - 1)) begin
            if (!last_sub) begin
              sub   <= sub + 1'b1;
              state <= S_CAP;
            end else if (round != num_reseed) begin
              round <= round + 1'b1;
              state <= S_SAVE;
            end else if (seed + 1'b1 < num_seeds) begin
              seed  <= seed + 1'b1;
              state <= S_ROMRD;
            end else begin
              state <= S_DONE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- outputs ----------------
  always_comb begin
    rom_raddr  = seed[AW-1:0];
    lfsr_mode  = LFSR_HOLD;
    seed_bit   = 1'b0;
    xv         = '0;
    shadow_cap = 1'b0;
    bist       = 1'b1;
    phase      = PH_DETERMINISTIC;
    test       = 1'b1;
    chains_on  = 1'b0;
    sel_init   = 1'b0;
    sel_adv    = 1'b0;
    nact       = KW'(1);
    wgen_adv   = 1'b0;
    misr_clear = 1'b0;
    misr_en    = 1'b0;
    done       = 1'b0;
    unique case (state)
      S_IDLE: begin
        bist       = 1'b0;
        sel_init   = start;
        nact       = (pr_cycles != 0) ? pr_active : KW'(1);
        misr_clear = start;
      end
      S_DONE: begin
        bist       = 1'b0;
        done       = 1'b1;
        sel_init   = start;
        nact       = (pr_cycles != 0) ? pr_active : KW'(1);
        misr_clear = start;
      end
      S_PR: begin
        phase     = PH_PSEUDORANDOM;
        lfsr_mode = LFSR_RUN;
        chains_on = 1'b1;
        wgen_adv  = 1'b1;
        misr_en   = 1'b1;
        sel_adv   = (sub_cyc == pr_sub_cycles - 16'd1);
        sel_init  = (pr_cnt == pr_cycles - 1);   // phase 1 starts at R_k
        nact      = sel_init ? KW'(1) : pr_active;
      end
      S_ROMRD: ;
      S_SEED: begin
        lfsr_mode = LFSR_SHIN;
        seed_bit  = rom_word[L - 1 - int'(cnt)];
      end
      S_SAVE:  shadow_cap = 1'b1;
      S_FLOAD, S_RLOAD: lfsr_mode = LFSR_LOAD;
      S_FILL, S_REFILL: begin
        lfsr_mode = LFSR_RUN;
        chains_on = 1'b1;
        if (int'(cnt) < I) xv = rom_word[L + xcyc * V +: V];
        sel_adv   = (cnt == CW'(D - 1));
        misr_en   = (state == S_REFILL);
      end
      S_CAP: begin
        chains_on = 1'b1;
        test      = 1'b0;
      end
      default: ;
    endcase
  end

  initial assert (I <= D) else $fatal(1, "bist_controller: I must not exceed D");

endmodule
