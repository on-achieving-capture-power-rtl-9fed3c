// cps_bist_pkg: types and helper functions shared by the capture-power-safe
// logic BIST (CPS-BIST) modules.
//
// - mask_option_e selects the masking option of the BIST: partial-mask masks
//   the individual risky response bits ahead of the space compactor; full-mask
//   masks the whole compacted response of every risky test vector between the
//   compactor and the MISR. Both options are the scheme's own.
// - ps_tap() gives the three PRPG bits XORed into one phase-shifter output.
//   The scheme fixes only the phase shifter's size (20 to 200); the tap rule is
//   this design's choice: output i of an IN_W-input shifter uses bit a = i mod
//   IN_W, bit a + 1 + (k mod IN_W/2) and bit a + IN_W/2 + 1 + (k mod
//   (IN_W/2 - 1)), all modulo IN_W, where k = i / IN_W. The three taps are
//   always distinct, and for OUT_W <= IN_W*IN_W/2 no two outputs share a tap set.
// - clog2_min1() is $clog2 that never returns 0, for counter widths.
package cps_bist_pkg;

  typedef enum logic {
    MASK_PARTIAL = 1'b0,
    MASK_FULL    = 1'b1
  } mask_option_e;

  // BIST controller phases (Fig. 1 launch-on-capture clocking)
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_SHIFT   = 3'd1,
    ST_LAUNCH  = 3'd2,   // T1: stimulus launch pulse, SE = 0
    ST_CAPTURE = 3'd3,   // T2: response capture pulse, SE = 0
    ST_DONE    = 3'd4
  } bist_state_e;

  function automatic int unsigned ps_tap(int unsigned out_idx,
                                         int unsigned which,
                                         int unsigned in_w);
    int unsigned a, k, half;
    half = in_w / 2;
    a    = out_idx % in_w;
    k    = out_idx / in_w;
    case (which)
      0:       return a;
      1:       return (a + 1 + (k % half)) % in_w;
      default: return (a + half + 1 + (k % (half - 1))) % in_w;
    endcase
  endfunction

  function automatic int unsigned clog2_min1(longint unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
