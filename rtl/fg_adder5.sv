// fg_adder5: reversible one-bit full adder made of five Fredkin gates.
//
// Five lines run through the circuit: the operands p and q, the carry-in r, and
// two constant (ancilla) lines holding 0 and 1. Every gate has one line as its
// control (C) and swaps two others (B, A) when the control is 1, so no signal
// ever fans out: a value that is needed twice is carried on by a gate's F1.
//
//   gate 1: C = p, B = line0 (0), A = line1 (1)  -> line0 = p,        line1 = ~p
//   gate 2: C = q, B = line0,     A = line1      -> line0 = p^q,      line1 = ~(p^q)
//   gate 3: C = r, B = line0,     A = line1      -> line0 = s=p^q^r,  line1 = ~s
//   gate 4: C = line0 (s), B = r, A = line1      -> r-line = ~s&r,    line1 = ~s|r
//   gate 5: C = q, B = r-line,    A = line1      -> r-line = carry,   line1 = g
//
// Outputs: p and q come out unchanged, line0 is the sum (parity p^q^r), the
// r-line ends as the carry-out (pq | pr | qr) and line1 ends as a garbage bit
// g needed only to keep the map from five inputs to five outputs one-to-one.
// The gate order, the control line of each gate and which of the two constant
// lines enters B or A follow the published circuit and its gate-by-gate
// analysis. The constants are tied inside the module.
//
// Interface: inputs p, q, r; outputs p_o, q_o, sum, carry, g. Combinational.
module fg_adder5 (
  input  logic p,
  input  logic q,
  input  logic r,
  output logic p_o,
  output logic q_o,
  output logic sum,
  output logic carry,
  output logic g
);

  localparam logic ANC0 = 1'b0;   // constant line "0"
  localparam logic ANC1 = 1'b1;   // constant line "1"

  // Line values after each gate: l0 = line "0", l1 = line "1", lr = line r.
  logic g1_p, g1_l0, g1_l1;
  logic g2_q, g2_l0, g2_l1;
  logic g3_r, g3_l0, g3_l1;
  logic g4_s, g4_lr, g4_l1;
  logic g5_q, g5_lr, g5_l1;

  fredkin_lut u_g1 (.c(p),     .b(ANC0),  .a(ANC1),  .f1(g1_p), .f2(g1_l0), .f3(g1_l1));
  fredkin_lut u_g2 (.c(q),     .b(g1_l0), .a(g1_l1), .f1(g2_q), .f2(g2_l0), .f3(g2_l1));
  fredkin_lut u_g3 (.c(r),     .b(g2_l0), .a(g2_l1), .f1(g3_r), .f2(g3_l0), .f3(g3_l1));
  fredkin_lut u_g4 (.c(g3_l0), .b(g3_r),  .a(g3_l1), .f1(g4_s), .f2(g4_lr), .f3(g4_l1));
  fredkin_lut u_g5 (.c(g2_q),  .b(g4_lr), .a(g4_l1), .f1(g5_q), .f2(g5_lr), .f3(g5_l1));

  assign p_o   = g1_p;
  assign q_o   = g5_q;
  assign sum   = g4_s;
  assign carry = g5_lr;
  assign g     = g5_l1;

endmodule
