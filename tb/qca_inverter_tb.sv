// qca_inverter_tb -- checks that the inverter element outputs the opposite
// of its input for both input values, several times over. A watchdog ends
// the run with a failure if it does not finish.
module qca_inverter_tb;
  logic a, y;
  int   checks = 0, failures = 0;

  qca_inverter dut (.a(a), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = v[0];
      #1;
      checks++;
      if (y !== (a ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL a=%b y=%b", a, y);
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
