// maj3_tb -- exhaustive self-checking test of the three-input majority
// element. All eight input combinations are applied and the output is
// compared with a count of the ones among the inputs (>= 2). It then ties
// one input to 0 and to 1 and checks the AND and OR behaviour of the other
// two. A watchdog ends the run with a failure if it does not finish.
module maj3_tb;
  logic x2, x1, x0, y;
  int   checks = 0, failures = 0;

  maj3 dut (.x2(x2), .x1(x1), .x0(x0), .y(y));

  task automatic check(input logic exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: x2=%b x1=%b x0=%b y=%b expected %b", what, x2, x1, x0, y, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x2, x1, x0} = 3'(v);
      #1;
      check(($countones(3'(v)) >= 2), "majority");
    end
    for (int v = 0; v < 4; v++) begin
      {x2, x1} = 2'(v);
      x0 = 1'b0; #1; check(x2 && x1, "AND with x0=0");
      x0 = 1'b1; #1; check(x2 || x1, "OR with x0=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
