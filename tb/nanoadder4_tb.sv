// nanoadder4_tb -- end-to-end self-checking test of the four-bit adder at
// its default width.
//
// Phase 1 applies every combination of the two 4-bit operands and the carry
// in (512 vectors) and compares {c, s} with the integer sum. Phase 2 repeats
// the stimulus of the published four-bit simulation: only three signals,
// x1, x0 and c0, with x1 and x0 driven onto every stage at once, stepped
// through all eight combinations.
//
// It also counts how often each mechanism of the ripple adder occurs and
// fails if one never does, observing the adder's internal carry chain: a carry generated in each stage, a carry that
// ripples from c0 through all four stages, a carry out of the top stage
// (result overflowing four bits), and the sum element's "all three inputs
// set" case where s and carry are both 1. A watchdog ends the run with a
// failure if it does not finish.
module nanoadder4_tb;
  localparam int W = 4;

  logic [W-1:0] x1, x0, s;
  logic         c0, c;
  int           checks = 0, failures = 0;

  int n_generate [W];
  int n_full_ripple = 0;
  int n_carry_out   = 0;
  int n_all_three   = 0;

  nanoadder4 dut (.x1(x1), .x0(x0), .c0(c0), .s(s), .c(c));

  task automatic apply_and_check(input logic [W-1:0] a, input logic [W-1:0] b,
                                 input logic ci, input string phase);
    int unsigned total;
    x1 = a; x0 = b; c0 = ci;
    #1;
    total = int'(a) + int'(b) + int'(ci);
    checks++;
    if ({c, s} !== (W+1)'(total)) begin
      failures++;
      $display("FAIL %s: x1=%h x0=%h c0=%b -> c=%b s=%h, expected %0d",
               phase, a, b, ci, c, s, total);
    end
    // mechanism coverage, observed on the adder's internal carry chain
    // (dut.carry[i] enters stage i)
    begin
      logic all_prop = ci;
      for (int i = 0; i < W; i++) begin
        if (a[i] & b[i] & dut.carry[i+1]) n_generate[i]++;
        if (a[i] & b[i] & dut.carry[i] & s[i] & dut.carry[i+1]) n_all_three++;
        all_prop &= (a[i] ^ b[i]);
      end
      if (all_prop && (&dut.carry)) n_full_ripple++;
      if (c) n_carry_out++;
    end
  endtask

  initial begin
    foreach (n_generate[i]) n_generate[i] = 0;

    // Phase 1: exhaustive
    for (int v = 0; v < (1 << (2*W+1)); v++)
      apply_and_check(W'(v), W'(v >> W), v[2*W], "exhaustive");

    // Phase 2: shared x1, x0, c0 on all stages
    for (int v = 0; v < 8; v++)
      apply_and_check({W{v[1]}}, {W{v[0]}}, v[2], "shared inputs");

    for (int i = 0; i < W; i++) begin
      checks++;
      if (n_generate[i] == 0) begin failures++; $display("FAIL no carry generated in stage %0d", i); end
    end
    checks++; if (n_full_ripple == 0) begin failures++; $display("FAIL no full ripple"); end
    checks++; if (n_carry_out   == 0) begin failures++; $display("FAIL no carry out"); end
    checks++; if (n_all_three   == 0) begin failures++; $display("FAIL no all-three-set stage"); end
    $display("coverage: full ripple %0d, carry out %0d, all-three-set %0d, generate/stage %0d %0d %0d %0d",
             n_full_ripple, n_carry_out, n_all_three,
             n_generate[0], n_generate[1], n_generate[2], n_generate[3]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
