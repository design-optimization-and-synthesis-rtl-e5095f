// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
// The control input A passes through unchanged (P = A). When A is 0 the other
// two lines pass straight (Q = B, R = C); when A is 1 they are exchanged
// (Q = C, R = B). In sum-of-products form: Q = A'B + AC, R = AB + A'C. The
// gate is its own inverse and conserves the number of ones.
//
// Used as a decoder cell with C tied to 0, the gate splits the value on B
// into two branches: Q = A'.B carries it when the control is 0, R = A.B when
// the control is 1.
//
// Interface: a (control), b, c in; p, q, r out. Purely combinational, no
// clock. The function follows the published definition of the gate.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
