// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// The control input passes straight through (P = A) and the target input is
// inverted when the control is 1 (Q = A xor B). The mapping (A,B) -> (P,Q) is a
// bijection on two bits, so no information is lost; applying the gate twice
// gives back the inputs. With B tied to 1 the gate yields a copy of A on P and
// its complement on Q, which is how the 2-to-4 decoder uses it.
//
// Interface: a (control), b (target) in; p, q out. Purely combinational, no
// clock. The gate's function and port names follow the published definition
// of the gate; nothing here is a local choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
