// tb_comp_6_3: exhaustive self-check of the 6-3 compressor comp_6_3.
//
// Applies all 2**6 input patterns and compares cnt with the number of ones
// in the pattern, counted here bit by bit. Also checks that every count
// value 0..6 occurs and that all-ones gives 6. A watchdog ends the run with
// a failure if it has not finished after a fixed simulated time.
module tb_comp_6_3;
  localparam int N = 6;
  localparam int W = 3;

  logic [N-1:0] x;
  logic [W-1:0] cnt;
  int checks = 0;
  int failures = 0;
  int seen [N+1];

  comp_6_3 dut (.x(x), .cnt(cnt));

  function automatic int ones(input logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(v[i]);
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < (1 << N); v++) begin
      x = N'(v);
      #1;
      checks++;
      if (int'(cnt) != ones(x)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b cnt=%0d expected=%0d", x, cnt, ones(x));
      end else begin
        seen[ones(x)]++;
      end
    end
    // every count value must have appeared, the largest with all inputs at 1
    for (int k = 0; k <= N; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL count %0d never produced", k);
      end
    end
    x = '1;
    #1;
    checks++;
    if (cnt != W'(N)) begin
      failures++;
      $display("FAIL all ones: cnt=%b", cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
