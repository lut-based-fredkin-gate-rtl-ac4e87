// fredkin_pkg: types shared by the Fredkin gate cells and the adders built from them.
//
// It holds the mode of a two-mode gate, one side of a gate as a struct, and
// the two ends of a five-line Fredkin-gate full adder.
//
// A two-mode Fredkin gate can carry signals left to right ("forward": C,B,A in,
// F1,F2,F3 out) or right to left ("back": F1,F2,F3 in, C,B,A out). The circuit
// that introduces the two-mode gate draws one "Forward" and one "Back" control
// net; here they are taken as the two values of one mode bit, which is this
// design's own choice. The package holds no logic and no timing.
package fredkin_pkg;

  // Direction in which a two-mode gate (or a chain of them) passes signals.
  typedef enum logic {
    MODE_FORWARD = 1'b0,  // C,B,A drive F1,F2,F3
    MODE_BACK    = 1'b1   // F1,F2,F3 drive C,B,A
  } fg_mode_e;

  // One side of a Fredkin gate: the control line and the two swapped lines.
  // On the input side these are C, B, A; on the output side F1, F2, F3.
  typedef struct packed {
    logic ctl;  // C or F1
    logic mid;  // B or F2
    logic low;  // A or F3
  } fg_side_t;

  // The five lines of a Fredkin-gate full adder at its input end:
  // operands p, q, carry-in r and the two constant lines (0 and 1).
  typedef struct packed {
    logic p;
    logic q;
    logic r;
    logic anc0;
    logic anc1;
  } adder_left_t;

  // The five lines at its output end: p and q again, the sum (parity), the
  // carry-out and the garbage bit g.
  typedef struct packed {
    logic p;
    logic q;
    logic sum;
    logic carry;
    logic g;
  } adder_right_t;

endpackage
