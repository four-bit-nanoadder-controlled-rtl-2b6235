// maj5_tb -- exhaustive self-checking test of the five-input majority
// element. All 32 input combinations are applied and the output is compared
// with a count of the ones among the inputs (>= 3). A watchdog ends the run
// with a failure if it does not finish.
module maj5_tb;
  logic [4:0] x;
  logic       y;
  int         checks = 0, failures = 0;

  maj5 dut (.x(x), .y(y));

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (y !== ($countones(x) >= 3)) begin
        failures++;
        $display("FAIL x=%b y=%b", x, y);
      end
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
