// rev_decoder_2x4: reversible 2-to-4 line decoder from one Feynman gate and
// two Fredkin gates.
//
// How it works. A Feynman gate with its target tied to 1 produces in1 (P) and
// its complement in1' (Q). Both Fredkin gates are controlled by in2 and have
// one data input tied to 0:
//   Fredkin 1: B = 0, C = in1'  ->  Q = in2 . in1'  = out1
//                                   R = in2'. in1'  = out0
//   Fredkin 2: B = 0, C = in1   ->  Q = in2 . in1   = out3
//                                   R = in2'. in1   = out2
// The P output of the first Fredkin gate (a copy of in2) drives the control of
// the second one, and the P output of the second is the single garbage output
// go1 (= in2). The circuit thus uses 3 gates, 3 constant inputs (one 1, two
// 0s), 5 lines and 1 garbage output. The in1 copy leaving the Feynman gate is
// consumed by Fredkin 2, so it is not a separate output.
//
// Output index: out[k] is 1 exactly when {in1, in2} == k, i.e. in1 is the
// most significant select bit (out3 = in1.in2, out2 = in1.in2',
// out1 = in1'.in2, out0 = in1'.in2').
//
// Interface: in1, in2 in; out[3:0], go1 out. Purely combinational. The gate
// netlist and the output equations follow the published design; the chaining
// of the in2 control through the first Fredkin gate into the second follows
// its reversible-circuit drawing, where in2 is one line passing both gates.
module rev_decoder_2x4 (
  input  logic       in1,
  input  logic       in2,
  output logic [3:0] out,
  output logic       go1
);
  logic in1_copy, in1_n;  // Feynman outputs P and Q
  logic in2_mid;          // control line between the two Fredkin gates

  feynman_gate u_fy (
    .a(in1), .b(1'b1),
    .p(in1_copy), .q(in1_n)
  );

  fredkin_gate u_fr1 (
    .a(in2), .b(1'b0), .c(in1_n),
    .p(in2_mid), .q(out[1]), .r(out[0])
  );

  fredkin_gate u_fr2 (
    .a(in2_mid), .b(1'b0), .c(in1_copy),
    .p(go1), .q(out[3]), .r(out[2])
  );
endmodule
