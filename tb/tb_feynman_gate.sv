// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
//
// Drives all four input pairs, compares P and Q with P = A and Q = A xor B
// worked out here from the gate's definition, checks that the four output
// pairs are all different (the mapping is reversible), and checks that a
// second gate fed with the first one's outputs gives the inputs back.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;
  logic [3:0] seen;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b p=%0b q=%0b", what, a, b, p, q);
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
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(p == a, "P = A");
      check(q == ((a && !b) || (!a && b)), "Q = A xor B");
      check({p2, q2} == {a, b}, "gate is its own inverse");
      check(!seen[{p, q}], "outputs distinct (reversible)");
      seen[{p, q}] = 1'b1;
    end
    // constant-1 target gives the complement, as the decoder uses it
    a = 1'b0; b = 1'b1; #1; check(q == 1'b1, "A=0,B=1 gives Q=1");
    a = 1'b1; b = 1'b1; #1; check(q == 1'b0, "A=1,B=1 gives Q=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
