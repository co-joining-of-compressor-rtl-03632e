// column_compressor: the compressor that sums one product column.
//
// Counts the ones among its N inputs and returns the count on
// cnt_width(N) bits: cnt[0] is the product bit of the column, cnt[1], cnt[2]
// and cnt[3] are the carries into the next, second and third columns on.
//
// GENERAL = 0 ("dedicated"): the compressor sized to the column is used,
//   ha_mux for 2 inputs, fa_mux for 3, comp_4_3 ... comp_10_4 for 4..10.
// GENERAL = 1 ("general"): the 10-input compressor comp_10_4 is used for
//   every column, its unused inputs tied to 0. The count of an N-input
//   column never exceeds N, so the upper bits of its 4-bit result beyond
//   cnt_width(N) are always 0 and are left unconnected on purpose.
// A single input (N = 1) is passed straight through: the lowest product
// column is one AND term and needs no adder.
// Combinational. The two variants are the dedicated and the general
// multiplier of the design description; how the general one pads its
// inputs is this design's reading.
module column_compressor #(
  parameter  int N       = vedic_pkg::MAX_COMP_IN,
  parameter  bit GENERAL = 1'b0,
  localparam int W       = vedic_pkg::cnt_width(N)
) (
  input  logic [N-1:0] x,
  output logic [W-1:0] cnt
);
  if (N < 1 || N > vedic_pkg::MAX_COMP_IN) begin : g_bad_n
    $error("column_compressor: N must be 1..%0d", vedic_pkg::MAX_COMP_IN);
  end else if (N == 1) begin : g_wire
    assign cnt = x;
  end else if (GENERAL) begin : g_general
    logic [vedic_pkg::MAX_COMP_IN-1:0] x_pad;
    logic [3:0]                        cnt_full;
    assign x_pad = vedic_pkg::MAX_COMP_IN'(x);
    comp_10_4 u_comp (.x(x_pad), .cnt(cnt_full));
    assign cnt = cnt_full[W-1:0];
  end else begin : g_dedicated
    case (N)
      2:  begin : g_n2  ha_mux    u_comp (.a(x[0]), .b(x[1]), .s(cnt[0]), .co(cnt[1])); end
      3:  begin : g_n3  fa_mux    u_comp (.a(x[0]), .b(x[1]), .ci(x[2]), .s(cnt[0]), .co(cnt[1])); end
      4:  begin : g_n4  comp_4_3  u_comp (.x(x), .cnt(cnt)); end
      5:  begin : g_n5  comp_5_3  u_comp (.x(x), .cnt(cnt)); end
      6:  begin : g_n6  comp_6_3  u_comp (.x(x), .cnt(cnt)); end
      7:  begin : g_n7  comp_7_3  u_comp (.x(x), .cnt(cnt)); end
      8:  begin : g_n8  comp_8_4  u_comp (.x(x), .cnt(cnt)); end
      9:  begin : g_n9  comp_9_4  u_comp (.x(x), .cnt(cnt)); end
      default: begin : g_n10 comp_10_4 u_comp (.x(x), .cnt(cnt)); end
    endcase
  end
endmodule
