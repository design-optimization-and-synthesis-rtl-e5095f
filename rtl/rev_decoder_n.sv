// rev_decoder_n: general N-to-2^N reversible decoder built only from Fredkin
// gates arranged as a binary tree.
//
// How it works. Every Fredkin gate is used as a splitter: its B input carries
// a partial product x, its C input is tied to 0, and its control is one select
// bit s. Then Q = s'.x and R = s.x, so the value on x is steered to one of two
// branches. The root gate has B tied to 1 and is controlled by the most
// significant select bit, giving sel[N-1]' and sel[N-1]. Each following stage
// L (L = 1 .. N-1) has 2^L gates, all controlled by sel[N-1-L], which split
// every branch of the stage before. After N stages the 2^N leaves are the
// minterms of the select word: out[k] = 1 exactly when sel == k.
//
// The gates are numbered as a heap: gate h (1 .. 2^N-1) reads node[h] on B and
// drives node[2h] (Q, control 0) and node[2h+1] (R, control 1); node[1] is the
// constant 1 and the leaves node[2^N + k] are out[k]. Within a stage the select
// bit travels along one line through all of the stage's gates (the P output of
// one gate is the control of the next), and the P output of the last gate of
// stage L is the garbage output garbage[N-1-L], equal to that select bit.
//
// Cost: 2^N - 1 gates, 2^N constant inputs (one 1, the rest 0), N garbage
// outputs, 2^N + N lines. For N = 3: 7 gates, 8 constants, 3 garbage, 11 lines.
//
// Interface: sel[N-1:0] in; out[2^N-1:0] (one-hot), garbage[N-1:0] out.
// Purely combinational. The tree of gates and the constants follow the
// published general design; naming the select bits so that the first stage
// takes the most significant bit, and the ripple of the control through a
// stage, follow its 3-to-8 reversible-circuit drawing. N defaults to 3, the
// size worked out in full there.
module rev_decoder_n #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]      sel,
  output logic [2**N-1:0]   out,
  output logic [N-1:0]      garbage
);
  localparam int unsigned NGATES = 2**N - 1;

  // Tree nodes, heap-indexed. node[1] is the constant-1 input of the root.
  logic [2**(N+1)-1:1] node;
  // Control line of each gate (A input) and its pass-through (P output).
  logic [NGATES:1]     ctl_in, ctl_out;

  assign node[1] = 1'b1;

  for (genvar h = 1; h <= NGATES; h++) begin : g_gate
    localparam int unsigned LVL = $clog2(h + 1) - 1;  // stage of gate h

    if (h == (1 << LVL)) begin : g_first
      // first gate of a stage takes the select bit directly
      assign ctl_in[h] = sel[N-1-LVL];
    end else begin : g_chain
      // later gates take the control line from the previous gate's P output
      assign ctl_in[h] = ctl_out[h-1];
    end

    fredkin_gate u_fr (
      .a(ctl_in[h]), .b(node[h]), .c(1'b0),
      .p(ctl_out[h]), .q(node[2*h]), .r(node[2*h+1])
    );

    if (h == (2 << LVL) - 1) begin : g_last
      // last gate of a stage: its P output is the stage's garbage output
      assign garbage[N-1-LVL] = ctl_out[h];
    end
  end

  assign out = node[2**(N+1)-1 : 2**N];
endmodule
