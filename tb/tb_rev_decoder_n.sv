// tb_rev_decoder_n: exhaustive self-checking test of the general Fredkin-tree
// decoder at N = 1, 2, 3 (the default, a 3-to-8 decoder), 4 and 5.
//
// For every select word of every instance it checks that the output word is
// the one-hot code 1 << sel, built here by a shift, and that the garbage
// outputs equal the select bits. For N = 3 it also repeats the published
// all-zero case (out0 = 1, every other output and every garbage output 0).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_decoder_n;
  int checks = 0, failures = 0;

  logic [0:0]  s1;  logic [1:0]  o1;  logic [0:0] g1;
  logic [1:0]  s2;  logic [3:0]  o2;  logic [1:0] g2;
  logic [2:0]  s3;  logic [7:0]  o3;  logic [2:0] g3;
  logic [3:0]  s4;  logic [15:0] o4;  logic [3:0] g4;
  logic [4:0]  s5;  logic [31:0] o5;  logic [4:0] g5;

  rev_decoder_n #(.N(1)) dut1 (.sel(s1), .out(o1), .garbage(g1));
  rev_decoder_n #(.N(2)) dut2 (.sel(s2), .out(o2), .garbage(g2));
  rev_decoder_n          dut3 (.sel(s3), .out(o3), .garbage(g3));
  rev_decoder_n #(.N(4)) dut4 (.sel(s4), .out(o4), .garbage(g4));
  rev_decoder_n #(.N(5)) dut5 (.sel(s5), .out(o5), .garbage(g5));

  task automatic check(input bit ok, input int n, input int sel, input longint out);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d sel=%0d out=%h", n, sel, out);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {s1, s2, s3, s4, s5} = '0;
    #1;
    // published 3-to-8 case with every input 0
    check(o3 == 8'b0000_0001 && g3 == 3'b000, 3, 0, 64'(o3));

    for (int v = 0; v < 32; v++) begin
      s1 = 1'(v); s2 = 2'(v); s3 = 3'(v); s4 = 4'(v); s5 = 5'(v);
      #1;
      if (v < 2)  check(o1 == 2'(1 << v)  && g1 == s1, 1, v, 64'(o1));
      if (v < 4)  check(o2 == 4'(1 << v)  && g2 == s2, 2, v, 64'(o2));
      if (v < 8)  check(o3 == 8'(1 << v)  && g3 == s3, 3, v, 64'(o3));
      if (v < 16) check(o4 == 16'(1 << v) && g4 == s4, 4, v, 64'(o4));
      check(o5 == 32'(64'd1 << v) && g5 == s5, 5, v, 64'(o5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
