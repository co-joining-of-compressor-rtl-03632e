// tb_vedic_pp_gen: self-check of the partial product array vedic_pp_gen.
//
// Drives corner operands and 500 random operand pairs and compares every
// pp[i][j] with a[i] AND b[j]; also checks that the weighted sum of the
// array, sum of pp[i][j] * 2**(i+j), equals a * b. A watchdog ends the run
// with a failure after a fixed simulated time.
module tb_vedic_pp_gen;
  localparam int WIDTH = 8;

  logic [WIDTH-1:0]            a, b;
  logic [WIDTH-1:0][WIDTH-1:0] pp;
  int checks = 0;
  int failures = 0;

  vedic_pp_gen #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int unsigned total = 0;
    #1;
    for (int i = 0; i < WIDTH; i++) begin
      for (int j = 0; j < WIDTH; j++) begin
        checks++;
        if (pp[i][j] != (a[i] & b[j])) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h pp[%0d][%0d]=%b", a, b, i, j, pp[i][j]);
        end
        if (pp[i][j]) total += 1 << (i + j);
      end
    end
    checks++;
    if (total != int'(a) * int'(b)) begin
      failures++;
      $display("FAIL a=%h b=%h weighted sum %0d", a, b, total);
    end
  endtask

  initial begin
    a = '0;  b = '0;  check();
    a = '1;  b = '1;  check();
    a = 8'hA5; b = 8'h3C; check();
    a = 8'h01; b = 8'h80; check();
    for (int n = 0; n < 500; n++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
