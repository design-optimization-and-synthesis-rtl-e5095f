// tb_rev_decoder_top: end-to-end test of the top level at its default size
// (2-to-4 decoder and 3-to-8 Fredkin-tree decoder).
//
// Steps through every combination of the 2-to-4 decoder's two inputs and the
// 3-to-8 decoder's three select bits together (32 cases), so that each
// decoder sees every input while the other one changes too. Expected outputs
// are the one-hot codes and the garbage copies of the select inputs, worked
// out here. It counts how often each output line of each decoder was the
// selected one and counts a failure for any line that was never selected.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_decoder_top;
  localparam int N = 3;
  int checks = 0, failures = 0;

  logic            dec2_in1, dec2_in2, dec2_go1;
  logic [3:0]      dec2_out;
  logic [N-1:0]    decn_sel, decn_garbage;
  logic [2**N-1:0] decn_out;

  int hits2 [4];
  int hitsn [2**N];

  rev_decoder_top dut (
    .dec2_in1(dec2_in1), .dec2_in2(dec2_in2),
    .dec2_out(dec2_out), .dec2_go1(dec2_go1),
    .decn_sel(decn_sel), .decn_out(decn_out), .decn_garbage(decn_garbage)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%0b%0b out=%b go1=%0b sel=%0d outn=%b garb=%b", what,
               dec2_in1, dec2_in2, dec2_out, dec2_go1, decn_sel, decn_out, decn_garbage);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hits2[i]) hits2[i] = 0;
    foreach (hitsn[i]) hitsn[i] = 0;
    for (int v = 0; v < 4 * 2**N; v++) begin
      {dec2_in1, dec2_in2} = 2'(v);
      decn_sel = N'(v >> 2) ^ N'(v);  // vary both decoders together
      #1;
      check(dec2_out == 4'(1 << {dec2_in1, dec2_in2}), "2-to-4 one-hot output");
      check(dec2_go1 == dec2_in2, "2-to-4 garbage output");
      check(decn_out == (2**N)'(1 << decn_sel), "N-to-2^N one-hot output");
      check(decn_garbage == decn_sel, "N-to-2^N garbage outputs");
      for (int k = 0; k < 4; k++)    if (dec2_out[k]) hits2[k]++;
      for (int k = 0; k < 2**N; k++) if (decn_out[k]) hitsn[k]++;
    end
    for (int k = 0; k < 4; k++) begin
      $display("2-to-4 output %0d selected %0d times", k, hits2[k]);
      check(hits2[k] > 0, "every 2-to-4 output selected");
    end
    for (int k = 0; k < 2**N; k++) begin
      $display("N-to-2^N output %0d selected %0d times", k, hitsn[k]);
      check(hitsn[k] > 0, "every N-to-2^N output selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
