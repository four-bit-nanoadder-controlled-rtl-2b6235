// full_adder_tb -- exhaustive self-checking test of the one-bit majority
// full adder. All eight combinations of x1, x0 and c0 (the same set the
// one-bit circuit is simulated with) are applied; sum and carry are compared
// with the integer sum x1 + x0 + c0. A watchdog ends the run with a failure
// if it does not finish.
module full_adder_tb;
  logic x1, x0, c0, s, c;
  int   checks = 0, failures = 0;

  full_adder dut (.x1(x1), .x0(x0), .c0(c0), .s(s), .c(c));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] total;
      {c0, x0, x1} = 3'(v);
      #1;
      total = 2'(x1) + 2'(x0) + 2'(c0);
      checks += 2;
      if (s !== total[0]) begin
        failures++;
        $display("FAIL sum: x1=%b x0=%b c0=%b s=%b expected %b", x1, x0, c0, s, total[0]);
      end
      if (c !== total[1]) begin
        failures++;
        $display("FAIL carry: x1=%b x0=%b c0=%b c=%b expected %b", x1, x0, c0, c, total[1]);
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
