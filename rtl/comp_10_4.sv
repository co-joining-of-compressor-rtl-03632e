// comp_10_4: 10-4 compressor, counts the ones among ten bits of equal weight.
//
// cnt = x[0] + ... + x[9] (0..10) as a 4-bit binary number. cnt[0] is the
// sum bit, cnt[1..3] carries of weight 2, 4 and 8. This is the widest
// compressor of the design ("N = 10"): it serves the two middle columns of
// the 8x8 multiplier, and, with its unused inputs tied to 0, every column of
// the "general" multiplier variant. Only multiplexer-based full and half
// adders are used, as in the design description; their arrangement is this
// design's own:
//   weight 1: FA(x0,x1,x2) -> s1,c1   FA(x3,x4,x5) -> s2,c2
//             FA(x6,x7,x8) -> s3,c3   FA(s1,s2,s3) -> s4,c4
//             HA(s4,x9)    -> cnt[0],c5
//   weight 2: FA(c1,c2,c3) -> t,d1    FA(t,c4,c5)  -> cnt[1],d2
//   weight 4: HA(d1,d2)    -> cnt[2],cnt[3]
// Combinational.
module comp_10_4 (
  input  logic [9:0] x,
  output logic [3:0] cnt
);
  logic s1, s2, s3, s4, c1, c2, c3, c4, c5, t, d1, d2;

  fa_mux u_fa0 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),     .co(c1));
  fa_mux u_fa1 (.a(x[3]), .b(x[4]), .ci(x[5]), .s(s2),     .co(c2));
  fa_mux u_fa2 (.a(x[6]), .b(x[7]), .ci(x[8]), .s(s3),     .co(c3));
  fa_mux u_fa3 (.a(s1),   .b(s2),   .ci(s3),   .s(s4),     .co(c4));
  ha_mux u_ha0 (.a(s4),   .b(x[9]),              .s(cnt[0]), .co(c5));
  fa_mux u_fa4 (.a(c1),   .b(c2),   .ci(c3),   .s(t),      .co(d1));
  fa_mux u_fa5 (.a(t),    .b(c4),   .ci(c5),   .s(cnt[1]), .co(d2));
  ha_mux u_ha1 (.a(d1),   .b(d2),                .s(cnt[2]), .co(cnt[3]));
endmodule
