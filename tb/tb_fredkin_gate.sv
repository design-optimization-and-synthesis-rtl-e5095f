// tb_fredkin_gate: exhaustive self-checking test of the Fredkin gate.
//
// Drives all eight input triples and compares the outputs with the
// sum-of-products definition P = A, Q = A'B + AC, R = AB + A'C evaluated here.
// It also checks that the eight output triples are all different (the gate is
// reversible), that the number of ones is conserved, and that a second gate
// fed with the first one's outputs restores the inputs. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_fredkin_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut  (.a(a), .b(b), .c(c), .p(p),  .q(q),  .r(r));
  fredkin_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abc=%0b%0b%0b pqr=%0b%0b%0b", what, a, b, c, p, q, r);
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
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P = A");
      check(q == ((!a && b) || (a && c)), "Q = A'B + AC");
      check(r == ((a && b) || (!a && c)), "R = AB + A'C");
      check(32'(p) + 32'(q) + 32'(r) == 32'(a) + 32'(b) + 32'(c), "ones conserved");
      check({p2, q2, r2} == {a, b, c}, "gate is its own inverse");
      check(!seen[{p, q, r}], "outputs distinct (reversible)");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
