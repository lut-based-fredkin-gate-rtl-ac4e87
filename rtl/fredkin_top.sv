// fredkin_top: all the Fredkin-gate circuits side by side.
//
// The design is a reversible-logic cell, the Fredkin gate (controlled swap),
// built like a one-variable FPGA look-up table, and the one-bit full adders
// that are built from five of these gates. The top holds, each with its own
// ports:
//   - u_gate:   one forward-only gate (fredkin_lut), C,B,A -> F1,F2,F3;
//   - u_add5:   the five-gate full adder of the classic circuit (fg_adder5);
//   - u_addsyn: the five-gate adder derived by the decomposition-based
//               synthesis method (fg_adder_synth);
//   - u_addbd:  the synthesized adder built from two-mode gates
//               (fg_adder_bidir), which runs forward (add) or back (recover
//               the inputs from the outputs) under mode.
// Nothing is shared between them. Everything is combinational; there is no
// clock or reset. The adders' constant lines are tied inside fg_adder5 and
// fg_adder_synth and come in as ports for the two-mode adder, whose caller
// holds them at 0 and 1 to add.
module fredkin_top
  import fredkin_pkg::*;
(
  // Single Fredkin gate
  input  fg_side_t     gate_in,       // {C, B, A}
  output fg_side_t     gate_out,      // {F1, F2, F3}
  // Classic five-gate adder
  input  logic         add5_p,
  input  logic         add5_q,
  input  logic         add5_r,
  output adder_right_t add5_out,
  // Synthesized five-gate adder
  input  logic         addsyn_p,
  input  logic         addsyn_q,
  input  logic         addsyn_r,
  output adder_right_t addsyn_out,
  // Two-mode synthesized adder
  input  fg_mode_e     addbd_mode,
  input  adder_left_t  addbd_left_i,
  output adder_left_t  addbd_left_o,
  input  adder_right_t addbd_right_i,
  output adder_right_t addbd_right_o
);

  fredkin_lut u_gate (
    .c (gate_in.ctl), .b (gate_in.mid), .a (gate_in.low),
    .f1(gate_out.ctl), .f2(gate_out.mid), .f3(gate_out.low)
  );

  fg_adder5 u_add5 (
    .p(add5_p), .q(add5_q), .r(add5_r),
    .p_o(add5_out.p), .q_o(add5_out.q), .sum(add5_out.sum),
    .carry(add5_out.carry), .g(add5_out.g)
  );

  fg_adder_synth u_addsyn (
    .p(addsyn_p), .q(addsyn_q), .r(addsyn_r),
    .p_o(addsyn_out.p), .q_o(addsyn_out.q), .sum(addsyn_out.sum),
    .carry(addsyn_out.carry), .g(addsyn_out.g)
  );

  fg_adder_bidir u_addbd (
    .mode   (addbd_mode),
    .left_i (addbd_left_i),
    .left_o (addbd_left_o),
    .right_i(addbd_right_i),
    .right_o(addbd_right_o)
  );

endmodule
