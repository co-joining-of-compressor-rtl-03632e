// vedic_mult_8x8: 8x8 unsigned multiplier by the vertically-and-crosswise
// (Urdhva-Tiryakbhyam) method, with one compressor per product column.
//
// All 64 partial products AiBj are formed at once (vedic_pp_gen). Product
// bit Sk is the sum bit of column k, whose compressor adds every AiBj with
// i + j = k together with the carries that earlier columns send to it. A
// compressor's output is the binary count of its ones; its bit 1 (weight 2)
// goes to column k+1, bit 2 (weight 4) to column k+2 and bit 3 (weight 8) to
// column k+3. The carries are numbered C1..C33 in the order they appear,
// and the column equations are:
//
//   S0            = A0B0
//   C1  S1        = A0B1 + A1B0                                  2 inputs
//   C3  C2  S2    = C1 + A0B2 + A1B1 + A2B0                      4
//   C5  C4  S3    = C2 + A0B3 .. A3B0                            5
//   C7  C6  S4    = C3 + C4 + A0B4 .. A4B0                       7
//   C10 C9  C8 S5 = C5 + C6 + A0B5 .. A5B0                       8
//   C13 C12 C11 S6 = C7 + C8 + A0B6 .. A6B0                      9
//   C16 C15 C14 S7 = C9 + C11 + A0B7 .. A7B0                    10
//   C19 C18 C17 S8 = C10 + C12 + C14 + A1B7 .. A7B1             10
//   C22 C21 C20 S9 = C13 + C15 + C17 + A2B7 .. A7B2              9
//   C25 C24 C23 S10 = C16 + C18 + C20 + A3B7 .. A7B3             8
//   C27 C26 S11   = C19 + C21 + C23 + A4B7 .. A7B4               7
//   C29 C28 S12   = C22 + C24 + C26 + A5B7 + A6B6 + A7B5         6
//   C31 C30 S13   = C25 + C27 + C28 + A6B7 + A7B6                5
//   C32 S14       = C29 + C30 + A7B7                             3
//   C33 S15       = C31 + C32                                    2
//
// C33 would be a 17th product bit; an 8x8 product fits in 16 bits, so it is
// always 0 and an assertion checks that.
//
// GENERAL_N10 = 0 (default, "dedicated"): each column uses the compressor of
// its own input count. GENERAL_N10 = 1 ("general"): every column uses the
// 10-input compressor with unused inputs tied to 0; same result, more delay.
//
// Ports: a, b are unsigned operands (bit 0 = A0, B0); p is the 16-bit
// product S15..S0. Purely combinational, no clock or reset: the result is
// valid one combinational delay after the operands change.
// The column equations, their carry numbering and the multiplexer-based
// adders follow the design description; operand signedness (unsigned) and
// the exact adder arrangement inside each compressor are this design's own.
module vedic_mult_8x8 #(
  parameter bit GENERAL_N10 = 1'b0
) (
  input  logic [vedic_pkg::OP_WIDTH-1:0]   a,
  input  logic [vedic_pkg::OP_WIDTH-1:0]   b,
  output logic [vedic_pkg::PROD_WIDTH-1:0] p
);
  localparam bit G = GENERAL_N10;

  logic [7:0][7:0] pp;   // pp[i][j] = AiBj
  logic c1,  c2,  c3,  c4,  c5,  c6,  c7,  c8,  c9,  c10, c11,
        c12, c13, c14, c15, c16, c17, c18, c19, c20, c21, c22,
        c23, c24, c25, c26, c27, c28, c29, c30, c31, c32, c33;

  vedic_pp_gen #(.WIDTH(8)) u_pp (.a(a), .b(b), .pp(pp));

  // column 0: a single AND term
  assign p[0] = pp[0][0];

  column_compressor #(.N(2), .GENERAL(G)) u_col1 (
    .x({pp[0][1], pp[1][0]}),
    .cnt({c1, p[1]}));

  column_compressor #(.N(4), .GENERAL(G)) u_col2 (
    .x({c1, pp[0][2], pp[1][1], pp[2][0]}),
    .cnt({c3, c2, p[2]}));

  column_compressor #(.N(5), .GENERAL(G)) u_col3 (
    .x({c2, pp[0][3], pp[1][2], pp[2][1], pp[3][0]}),
    .cnt({c5, c4, p[3]}));

  column_compressor #(.N(7), .GENERAL(G)) u_col4 (
    .x({c3, c4, pp[0][4], pp[1][3], pp[2][2], pp[3][1], pp[4][0]}),
    .cnt({c7, c6, p[4]}));

  column_compressor #(.N(8), .GENERAL(G)) u_col5 (
    .x({c5, c6, pp[0][5], pp[1][4], pp[2][3], pp[3][2], pp[4][1], pp[5][0]}),
    .cnt({c10, c9, c8, p[5]}));

  column_compressor #(.N(9), .GENERAL(G)) u_col6 (
    .x({c7, c8, pp[0][6], pp[1][5], pp[2][4], pp[3][3], pp[4][2], pp[5][1],
        pp[6][0]}),
    .cnt({c13, c12, c11, p[6]}));

  column_compressor #(.N(10), .GENERAL(G)) u_col7 (
    .x({c9, c11, pp[0][7], pp[1][6], pp[2][5], pp[3][4], pp[4][3], pp[5][2],
        pp[6][1], pp[7][0]}),
    .cnt({c16, c15, c14, p[7]}));

  column_compressor #(.N(10), .GENERAL(G)) u_col8 (
    .x({c10, c12, c14, pp[1][7], pp[2][6], pp[3][5], pp[4][4], pp[5][3],
        pp[6][2], pp[7][1]}),
    .cnt({c19, c18, c17, p[8]}));

  column_compressor #(.N(9), .GENERAL(G)) u_col9 (
    .x({c13, c15, c17, pp[2][7], pp[3][6], pp[4][5], pp[5][4], pp[6][3],
        pp[7][2]}),
    .cnt({c22, c21, c20, p[9]}));

  column_compressor #(.N(8), .GENERAL(G)) u_col10 (
    .x({c16, c18, c20, pp[3][7], pp[4][6], pp[5][5], pp[6][4], pp[7][3]}),
    .cnt({c25, c24, c23, p[10]}));

  column_compressor #(.N(7), .GENERAL(G)) u_col11 (
    .x({c19, c21, c23, pp[4][7], pp[5][6], pp[6][5], pp[7][4]}),
    .cnt({c27, c26, p[11]}));

  column_compressor #(.N(6), .GENERAL(G)) u_col12 (
    .x({c22, c24, c26, pp[5][7], pp[6][6], pp[7][5]}),
    .cnt({c29, c28, p[12]}));

  column_compressor #(.N(5), .GENERAL(G)) u_col13 (
    .x({c25, c27, c28, pp[6][7], pp[7][6]}),
    .cnt({c31, c30, p[13]}));

  column_compressor #(.N(3), .GENERAL(G)) u_col14 (
    .x({c29, c30, pp[7][7]}),
    .cnt({c32, p[14]}));

  column_compressor #(.N(2), .GENERAL(G)) u_col15 (
    .x({c31, c32}),
    .cnt({c33, p[15]}));

  // The product of two 8-bit numbers never needs a 17th bit.
  always_comb begin
    assert (c33 == 1'b0) else $error("vedic_mult_8x8: carry C33 out of S15 is set");
  end
endmodule
