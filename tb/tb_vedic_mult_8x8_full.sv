// tb_vedic_mult_8x8_full: exhaustive check of the multiplier exactly as
// delivered, every parameter at its default (the dedicated form).
//
// Applies all 65536 operand pairs, one per nanosecond, and compares p with
// a * b. It also checks the extreme cases 255 * 255 = 65025 (all 16 product
// bits in play) and x * 0 = 0 separately. A watchdog ends the run with a
// failure after a fixed simulated time.
module tb_vedic_mult_8x8_full;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0;
  int failures = 0;

  vedic_mult_8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      checks++;
      if (p != 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, p);
      end
    end
    a = 8'd255; b = 8'd255; #1;
    checks++;
    if (p != 16'd65025) begin
      failures++;
      $display("FAIL 255 * 255 = %0d", p);
    end
    a = 8'd173; b = 8'd0; #1;
    checks++;
    if (p != 16'd0) begin
      failures++;
      $display("FAIL 173 * 0 = %0d", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
