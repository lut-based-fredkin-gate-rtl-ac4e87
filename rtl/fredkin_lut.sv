// fredkin_lut: a Fredkin gate (controlled swap) built like a one-variable FPGA LUT.
//
// Function: F1 = C; when C = 0 the data inputs pass straight (F2 = B, F3 = A);
// when C = 1 they are swapped (F2 = A, F3 = B). Equivalently F2 = CA | ~C B and
// F3 = ~C A | C B. The gate is its own inverse and keeps the number of ones.
//
// Structure, following the transistor circuit it models: C goes through two
// inverters to F1 (the first one also gives ~C for the switches); B and A are
// each inverted once; four pass switches, two per output, steered by C and ~C,
// pick ~A or ~B for each output node; an output inverter restores the true
// polarity on F2 and F3. That is two selection trees sharing one select
// variable, where an ordinary LUT has one. Each switch is modelled as the
// branch of a 2-to-1 selection; the inverter pairs are kept as named nets so
// the structure is visible, and synthesis folds them away.
//
// Interface: inputs c, b, a; outputs f1, f2, f3. Purely combinational, no clock.
module fredkin_lut (
  input  logic c,
  input  logic b,
  input  logic a,
  output logic f1,
  output logic f2,
  output logic f3
);

  logic c_n;   // ~C, drives the switches that are on when C = 0
  logic b_n;   // ~B after the input inverter
  logic a_n;   // ~A after the input inverter
  logic n2;    // switch node in front of the F2 inverter
  logic n3;    // switch node in front of the F3 inverter

  assign c_n = ~c;
  assign b_n = ~b;
  assign a_n = ~a;

  // Switch pair of F2: ~B passes while C = 0, ~A while C = 1.
  // Switch pair of F3: ~A passes while C = 0, ~B while C = 1.
  always_comb begin
    n2 = c_n ? b_n : a_n;
    n3 = c_n ? a_n : b_n;
  end

  assign f1 = ~c_n;
  assign f2 = ~n2;
  assign f3 = ~n3;

endmodule
