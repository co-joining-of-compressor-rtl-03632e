// tb_mux2: exhaustive self-check of the 2:1 multiplexer mux2.
//
// Applies all eight combinations of d0, d1 and s and compares y with the
// selected input. A watchdog ends the run with a failure after a fixed
// simulated time.
module tb_mux2;
  logic d0, d1, s, y;
  int checks = 0;
  int failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .s(s), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, d1, d0} = 3'(v);
      #1;
      checks++;
      if (y !== (s ? d1 : d0)) begin
        failures++;
        $display("FAIL s=%b d1=%b d0=%b y=%b", s, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
