// tb_vedic_mult_8x8: end-to-end self-check of the 8x8 Vedic multiplier in
// both of its forms.
//
// Two instances run side by side on the same operands: the dedicated form
// (default, one compressor sized to each column) and the general form
// (GENERAL_N10 = 1, the 10-input compressor in every column). All 65536
// operand pairs are applied and both products are compared with a * b.
//
// Coverage of the column scheme is counted from a bit-level model of the
// columns kept here: for each of the 16 columns, how often its count set its
// top output bit (the carry that travels farthest: to the next column for
// 2..3 inputs, two columns on for 4..7, three columns on for 8..10; column
// 15's would be C33, which must never be set), and the same summed over the
// columns that share a compressor size (2..10 inputs). How often a column
// saw all of its inputs at 1 is printed for information; the middle columns
// can never reach that. Any mechanism that never happened counts as a
// failure. A watchdog ends the run with a failure after a fixed simulated
// time.
module tb_vedic_mult_8x8;
  logic [7:0]  a, b;
  logic [15:0] p_ded, p_gen;
  int checks = 0;
  int failures = 0;

  // inputs of each column: partial products plus arriving carries
  localparam int COL_N [16] = '{1, 2, 4, 5, 7, 8, 9, 10, 10, 9, 8, 7, 6, 5, 3, 2};

  int top_bit_hits [16];
  int full_hits    [16];

  vedic_mult_8x8                    dut_ded (.a(a), .b(b), .p(p_ded));
  vedic_mult_8x8 #(.GENERAL_N10(1)) dut_gen (.a(a), .b(b), .p(p_gen));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // column model: count of ones in column k, carries by weight
  task automatic cover_columns(input logic [7:0] x, input logic [7:0] y);
    int cnt [16];
    int w;
    foreach (cnt[k]) cnt[k] = 0;
    for (int k = 0; k < 16; k++) begin
      for (int i = 0; i < 8; i++)
        if (k - i >= 0 && k - i < 8) cnt[k] += int'(x[i]) & int'(y[k-i]);
      for (int j = 1; j <= 3; j++)
        if (k - j >= 0) cnt[k] += (cnt[k-j] >> j) & 1;
      w = $clog2(COL_N[k] + 1);
      if (k > 0 && ((cnt[k] >> (w - 1)) & 1) == 1) top_bit_hits[k]++;
      if (cnt[k] == COL_N[k]) full_hits[k]++;
    end
  endtask

  initial begin
    foreach (top_bit_hits[k]) begin
      top_bit_hits[k] = 0;
      full_hits[k]    = 0;
    end
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      checks += 2;
      if (p_ded != 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL dedicated %0d * %0d = %0d", a, b, p_ded);
      end
      if (p_gen != 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL general %0d * %0d = %0d", a, b, p_gen);
      end
      cover_columns(a, b);
    end
    for (int k = 1; k < 16; k++) begin
      $display("column %2d (%2d inputs): top output bit set %0d times, all inputs at 1 %0d times",
               k, COL_N[k], top_bit_hits[k], full_hits[k]);
      checks++;
      if (k == 15) begin
        if (top_bit_hits[k] != 0) begin
          failures++;
          $display("FAIL column 15 set C33");
        end
      end else if (top_bit_hits[k] == 0) begin
        failures++;
        $display("FAIL column %0d never set its top output bit", k);
      end
    end
    for (int n = 2; n <= 10; n++) begin
      automatic int hits = 0;
      for (int k = 1; k < 15; k++) if (COL_N[k] == n) hits += top_bit_hits[k];
      $display("compressor with %2d inputs: top output bit set %0d times", n, hits);
      checks++;
      if (hits == 0) begin
        failures++;
        $display("FAIL %0d-input compressor never set its top output bit", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
