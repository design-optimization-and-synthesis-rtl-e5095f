// tb_rev_decoder_2x4: exhaustive self-checking test of the reversible 2-to-4
// decoder.
//
// For each of the four input combinations it compares the outputs with the
// minterms written out here (out3 = in1.in2, out2 = in1.in2', out1 = in1'.in2,
// out0 = in1'.in2'), checks that exactly one output is high, and that the
// garbage output go1 equals in2. The four cases match the four published
// simulation snapshots of this circuit (out0, out1, out2, out3 selected in
// turn). A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_decoder_2x4;
  logic       in1, in2, go1;
  logic [3:0] out, expected;
  int checks = 0, failures = 0;

  rev_decoder_2x4 dut (.in1(in1), .in2(in2), .out(out), .go1(go1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in1=%0b in2=%0b out=%b go1=%0b", what, in1, in2, out, go1);
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
    for (int v = 0; v < 4; v++) begin
      {in1, in2} = 2'(v);
      #1;
      expected[3] = in1 & in2;
      expected[2] = in1 & ~in2;
      expected[1] = ~in1 & in2;
      expected[0] = ~in1 & ~in2;
      check(out == expected, "minterm outputs");
      check($onehot(out), "exactly one output high");
      check(go1 == in2, "garbage output equals in2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
