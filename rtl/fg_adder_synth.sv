// fg_adder_synth: the full adder obtained by synthesizing a Fredkin-gate chain
// from its output backwards.
//
// Synthesis method: start from the wanted function f on output F2 of the last
// gate FG(k). Shannon-expand f about one variable x: f = x g | ~x h. Then x is
// that gate's control C, h its B input and g its A input. Each of g and h is
// in turn the F2 or F3 output of an earlier gate and is expanded the same way,
// until every input is a primary variable or a constant. Applied to the carry
// of a full adder this gives the chain below (s = p^q^r):
//
//   FG(k-4): C = q, B = 0,        A = 1          -> F1 = q, F2 = q,      F3 = ~q
//   FG(k-3): C = p, B = q,        A = ~q         -> F1 = p, F2 = p^q,    F3 = ~(p^q)
//   FG(k-2): C = r, B = p^q,      A = ~(p^q)     -> F1 = r, F2 = s,      F3 = ~s
//   FG(k-1): C = s, B = r,        A = ~s         -> F1 = s, F2 = ~s&r,   F3 = ~s|r
//   FG(k):   C = q, B = ~s&r,     A = ~s|r       -> F1 = q, F2 = carry,  F3 = g
//
// q reaches FG(k) on F1 of FG(k-4), so no line fans out. It is the five-gate
// adder of fg_adder5 with the first two gates' controls exchanged. The
// constants entering FG(k-4) are B = 0, A = 1: that is the choice that gives
// F2 = q and F3 = ~q on that gate, which the rest of the chain relies on.
//
// Interface: inputs p, q, r; outputs p_o, q_o, sum (F1 of FG(k-1)), carry
// (F2 of FG(k)), g (F3 of FG(k), unused garbage). Combinational.
module fg_adder_synth (
  input  logic p,
  input  logic q,
  input  logic r,
  output logic p_o,
  output logic q_o,
  output logic sum,
  output logic carry,
  output logic g
);

  localparam logic ANC0 = 1'b0;
  localparam logic ANC1 = 1'b1;

  logic k4_f1, k4_f2, k4_f3;
  logic k3_f1, k3_f2, k3_f3;
  logic k2_f1, k2_f2, k2_f3;
  logic k1_f1, k1_f2, k1_f3;
  logic k0_f1, k0_f2, k0_f3;

  fredkin_lut u_k4 (.c(q),     .b(ANC0),  .a(ANC1),  .f1(k4_f1), .f2(k4_f2), .f3(k4_f3));
  fredkin_lut u_k3 (.c(p),     .b(k4_f2), .a(k4_f3), .f1(k3_f1), .f2(k3_f2), .f3(k3_f3));
  fredkin_lut u_k2 (.c(r),     .b(k3_f2), .a(k3_f3), .f1(k2_f1), .f2(k2_f2), .f3(k2_f3));
  fredkin_lut u_k1 (.c(k2_f2), .b(k2_f1), .a(k2_f3), .f1(k1_f1), .f2(k1_f2), .f3(k1_f3));
  fredkin_lut u_k0 (.c(k4_f1), .b(k1_f2), .a(k1_f3), .f1(k0_f1), .f2(k0_f2), .f3(k0_f3));

  assign p_o   = k3_f1;
  assign q_o   = k0_f1;
  assign sum   = k1_f1;
  assign carry = k0_f2;
  assign g     = k0_f3;

endmodule
