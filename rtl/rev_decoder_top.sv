// rev_decoder_top: the two reversible decoders side by side.
//
// The first is the compact 2-to-4 decoder (one Feynman and two Fredkin gates,
// one garbage output). The second is the general N-to-2^N decoder made of a
// tree of 2^N - 1 Fredkin gates, here at N = 3 (a 3-to-8 decoder) unless
// overridden. They share no signals; each has its own select inputs, one-hot
// outputs and garbage outputs brought out as ports.
//
// Interface: dec2_in1, dec2_in2 -> dec2_out[3:0], dec2_go1;
//            decn_sel[N-1:0]    -> decn_out[2^N-1:0], decn_garbage[N-1:0].
// Purely combinational. Putting both decoders in one top level is a choice of
// this design; they are independent circuits.
module rev_decoder_top #(
  parameter int unsigned N = 3
) (
  input  logic            dec2_in1,
  input  logic            dec2_in2,
  output logic [3:0]      dec2_out,
  output logic            dec2_go1,
  input  logic [N-1:0]    decn_sel,
  output logic [2**N-1:0] decn_out,
  output logic [N-1:0]    decn_garbage
);
  rev_decoder_2x4 u_dec2 (
    .in1(dec2_in1), .in2(dec2_in2),
    .out(dec2_out), .go1(dec2_go1)
  );

  rev_decoder_n #(.N(N)) u_decn (
    .sel(decn_sel), .out(decn_out), .garbage(decn_garbage)
  );
endmodule
