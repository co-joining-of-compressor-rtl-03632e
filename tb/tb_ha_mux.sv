// tb_ha_mux: exhaustive self-check of the multiplexer half adder ha_mux.
//
// For all four input pairs, checks that {co, s} equals a + b. A watchdog
// ends the run with a failure after a fixed simulated time.
module tb_ha_mux;
  logic a, b, s, co;
  int checks = 0;
  int failures = 0;

  ha_mux dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    #1000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b -> co=%b s=%b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
