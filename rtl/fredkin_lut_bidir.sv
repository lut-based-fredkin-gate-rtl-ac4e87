// fredkin_lut_bidir: a two-mode Fredkin gate that can run forward or back.
//
// Forward mode (mode = MODE_FORWARD): the left side C,B,A drives the right side
// F1,F2,F3 exactly like fredkin_lut: F1 = C, and B,A pass to F2,F3 straight
// when C = 0 and swapped when C = 1.
// Back mode (mode = MODE_BACK): values placed on F1,F2,F3 are rolled back to
// C,B,A through the same swap: C = F1, B = F2 and A = F3 when F1 = 0, and
// B = F3, A = F2 when F1 = 1. Because the Fredkin gate is its own inverse, back
// mode returns the inputs that produced a given output.
//
// Structure: the transistor circuit this models has one set of four swap
// switches and puts a pair of direction-gated restoring inverters on every
// terminal, one pair enabled by "Forward", the other by "Back", so each
// terminal is either driven or listened to. A shared bidirectional wire cannot
// be written as two-state synthesizable logic, so every terminal is split here
// into an input half (*_i) and an output half (*_o), as for a pad. The output
// half of the side being listened to stays at zero. Taking Forward and Back as the
// two values of one mode bit, and the zeros on the idle side, are this
// design's own choices.
//
// Interface: mode; left_i/left_o = {C,B,A}; right_i/right_o = {F1,F2,F3}
// (fg_side_t: ctl, mid, low). Purely combinational, no clock.
module fredkin_lut_bidir
  import fredkin_pkg::*;
(
  input  fg_mode_e mode,
  input  fg_side_t left_i,    // C,B,A applied from the left (used in forward mode)
  output fg_side_t left_o,    // C,B,A recovered (driven in back mode)
  input  fg_side_t right_i,   // F1,F2,F3 applied from the right (used in back mode)
  output fg_side_t right_o    // F1,F2,F3 produced (driven in forward mode)
);

  fg_side_t fwd;   // swap of the left side, seen from the right
  fg_side_t bwd;   // swap of the right side, seen from the left

  // The four pass switches conduct both ways. In two-state logic the one
  // switch network becomes two directional copies, so that no path leads from
  // a terminal back to the same side and a chain of these cells has no
  // combinational loop.
  always_comb begin
    fwd.ctl = left_i.ctl;
    fwd.mid = left_i.ctl ? left_i.low : left_i.mid;
    fwd.low = left_i.ctl ? left_i.mid : left_i.low;

    bwd.ctl = right_i.ctl;
    bwd.mid = right_i.ctl ? right_i.low : right_i.mid;
    bwd.low = right_i.ctl ? right_i.mid : right_i.low;

    // Direction-gated output inverter pairs: only the far side is driven.
    right_o = (mode == MODE_FORWARD) ? fwd : '0;
    left_o  = (mode == MODE_BACK)    ? bwd : '0;
  end

endmodule
