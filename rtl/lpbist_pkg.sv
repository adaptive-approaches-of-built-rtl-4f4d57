// lpbist_pkg: types shared by the low-power scan BIST blocks.
//
// The BIST runs in two phases: a weighted pseudorandom phase (phase 0) in
// which every scan chain gets its own weighted test-enable signal, and a
// deterministic phase (phase 1) in which LFSR seeds plus extra variables are
// expanded into deterministic vectors, followed by reseeding rounds. Only one
// subset of scan trees is clocked in any cycle, in both phases.
//
// The four weights {0.5, 0.625, 0.75, 0.875} follow the text; their 3-bit
// encoding and the extra "conventional test-per-scan" choice (used for a chain
// for which no weight was selected) are this design's own encoding.
package lpbist_pkg;

  // Probability that a chain shifts (test-enable = 1) in a cycle of phase 0.
  typedef enum logic [2:0] {
    W_0500 = 3'd0,  // 4/8
    W_0625 = 3'd1,  // 5/8
    W_0750 = 3'd2,  // 6/8
    W_0875 = 3'd3,  // 7/8
    W_TPS  = 3'd4   // conventional test-per-scan: D shifts, then one capture
  } weight_t;

  // LFSR operating modes.
  typedef enum logic [1:0] {
    LFSR_HOLD  = 2'd0,  // keep state
    LFSR_RUN   = 2'd1,  // shift with feedback, extra variables XORed in
    LFSR_SHIN  = 2'd2,  // serial seed shift-in, no feedback
    LFSR_LOAD  = 2'd3   // parallel reload from the shadow register
  } lfsr_mode_t;

  // BIST phase, as printed on the test-enable multiplexers of the gating logic.
  typedef enum logic {
    PH_PSEUDORANDOM   = 1'b0,
    PH_DETERMINISTIC  = 1'b1
  } phase_t;

  // Controller states.
  typedef enum logic [3:0] {
    S_IDLE,      // waiting for start
    S_PR,        // weighted pseudorandom phase
    S_ROMRD,     // read the seed word of the current deterministic vector
    S_SEED,      // shift the seed serially into the LFSR
    S_SAVE,      // copy LFSR into the shadow register (start of a round)
    S_FLOAD,     // reload LFSR before filling a subset
    S_FILL,      // shift D cycles into the active subset
    S_CAP,       // capture cycle of the active subset
    S_RLOAD,     // reload LFSR before refilling the subset that captured
    S_REFILL,    // refill the subset, responses shifted into the MISR
    S_DONE
  } state_t;

  // Weight code to the number of eighths (out of 8) with test-enable = 1.
  function automatic logic [3:0] weight_eighths(weight_t w);
    case (w)
      W_0500:  return 4'd4;
      W_0625:  return 4'd5;
      W_0750:  return 4'd6;
      W_0875:  return 4'd7;
      default: return 4'd8;
    endcase
  endfunction

endpackage
