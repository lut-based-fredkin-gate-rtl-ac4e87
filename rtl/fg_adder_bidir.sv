// fg_adder_bidir: the synthesized Fredkin-gate full adder, built from two-mode
// gates so that it can also be run backwards.
//
// Forward mode (mode = MODE_FORWARD): p, q, r enter at the left end together
// with the constant lines 0 and 1, and p, q, sum, carry and g leave at the right
// end, exactly as in fg_adder_synth. Back mode (mode = MODE_BACK): a set of
// output values is placed on the right end and the same five gates, each in
// back mode, roll it to the left end. For an output set that the adder can
// produce, the left end then shows the p, q, r that produced it and the
// constants 0 and 1 on the ancilla lines; for example sum = 1, carry = 1
// (with p = q = 1, g = 0) rolls back to p = q = r = 1.
//
// Gate chain (s = p^q^r), the same as fg_adder_synth:
//   k4: {q, 0, 1}       -> {q, q, ~q}
//   k3: {p, q, ~q}      -> {p, p^q, ~(p^q)}
//   k2: {r, p^q, ~p^q}  -> {r, s, ~s}
//   k1: {s, r, ~s}      -> {s, ~s&r, ~s|r}
//   k0: {q, ~s&r, ~s|r} -> {q, carry, g}
// Every line between two gates has a forward half, driven by the gate on its
// left in forward mode, and a back half, driven by the gate on its right in
// back mode (see fredkin_lut_bidir). The ancilla lines are real inputs, so
// the module is a one-to-one map of five bits to five bits: it adds when
// they are held at anc0 = 0, anc1 = 1, and in back mode the recovered ancilla
// values come out on left_o.anc0 / left_o.anc1.
//
// Interface: mode; left_i = {p, q, r, anc0, anc1} used in forward mode;
// left_o recovered in back mode; right_i = {p, q, sum,
// carry, g} used in back mode; right_o produced in forward mode. The idle end
// outputs zeros. Combinational.
module fg_adder_bidir
  import fredkin_pkg::*;
(
  input  fg_mode_e     mode,
  input  adder_left_t  left_i,
  output adder_left_t  left_o,
  input  adder_right_t right_i,
  output adder_right_t right_o
);

  fg_side_t k4_li, k4_lo, k4_ri, k4_ro;
  fg_side_t k3_li, k3_lo, k3_ri, k3_ro;
  fg_side_t k2_li, k2_lo, k2_ri, k2_ro;
  fg_side_t k1_li, k1_lo, k1_ri, k1_ro;
  fg_side_t k0_li, k0_lo, k0_ri, k0_ro;

  // Forward halves: each gate's left side from the right side of the gate before.
  assign k4_li = '{ctl: left_i.q,  mid: left_i.anc0, low: left_i.anc1};
  assign k3_li = '{ctl: left_i.p,  mid: k4_ro.mid, low: k4_ro.low};
  assign k2_li = '{ctl: left_i.r,  mid: k3_ro.mid, low: k3_ro.low};
  assign k1_li = '{ctl: k2_ro.mid, mid: k2_ro.ctl, low: k2_ro.low};
  assign k0_li = '{ctl: k4_ro.ctl, mid: k1_ro.mid, low: k1_ro.low};

  // Back halves: each gate's right side from the left side of the gate after.
  assign k0_ri = '{ctl: right_i.q,   mid: right_i.carry, low: right_i.g};
  assign k1_ri = '{ctl: right_i.sum, mid: k0_lo.mid,     low: k0_lo.low};
  assign k2_ri = '{ctl: k1_lo.mid,   mid: k1_lo.ctl,     low: k1_lo.low};
  assign k3_ri = '{ctl: right_i.p,   mid: k2_lo.mid,     low: k2_lo.low};
  assign k4_ri = '{ctl: k0_lo.ctl,   mid: k3_lo.mid,     low: k3_lo.low};

  fredkin_lut_bidir u_k4 (.mode, .left_i(k4_li), .left_o(k4_lo), .right_i(k4_ri), .right_o(k4_ro));
  fredkin_lut_bidir u_k3 (.mode, .left_i(k3_li), .left_o(k3_lo), .right_i(k3_ri), .right_o(k3_ro));
  fredkin_lut_bidir u_k2 (.mode, .left_i(k2_li), .left_o(k2_lo), .right_i(k2_ri), .right_o(k2_ro));
  fredkin_lut_bidir u_k1 (.mode, .left_i(k1_li), .left_o(k1_lo), .right_i(k1_ri), .right_o(k1_ro));
  fredkin_lut_bidir u_k0 (.mode, .left_i(k0_li), .left_o(k0_lo), .right_i(k0_ri), .right_o(k0_ro));

  // Left end, driven in back mode.
  assign left_o.q    = k4_lo.ctl;
  assign left_o.anc0 = k4_lo.mid;
  assign left_o.anc1 = k4_lo.low;
  assign left_o.p    = k3_lo.ctl;
  assign left_o.r    = k2_lo.ctl;

  // Right end, driven in forward mode.
  assign right_o.p     = k3_ro.ctl;
  assign right_o.sum   = k1_ro.ctl;
  assign right_o.q     = k0_ro.ctl;
  assign right_o.carry = k0_ro.mid;
  assign right_o.g     = k0_ro.low;

endmodule
