// tb_fa_mux: exhaustive self-check of the multiplexer full adder fa_mux.
//
// For all eight input combinations, checks that {co, s} equals a + b + ci.
// A watchdog ends the run with a failure after a fixed simulated time.
module tb_fa_mux;
  logic a, b, ci, s, co;
  int checks = 0;
  int failures = 0;

  fa_mux dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #1000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
