// comp_8_4: 8-4 compressor, counts the ones among eight bits of equal weight.
//
// cnt = x[0] + ... + x[7] (0..8) as a 4-bit binary number. cnt[0] is the sum
// bit, cnt[1..3] carries of weight 2, 4 and 8. It belongs to the family of
// compressors for up to ten inputs used by the wide middle columns of the
// multiplier. Only multiplexer-based full and half adders are used, as in the
// design description; their arrangement is this design's own:
//   weight 1: FA(x0,x1,x2) -> s1,c1   FA(x3,x4,x5) -> s2,c2
//             FA(s1,s2,x6) -> s3,c3   HA(s3,x7)    -> cnt[0],c4
//   weight 2: FA(c1,c2,c3) -> t,d1    HA(t,c4)     -> cnt[1],d2
//   weight 4: HA(d1,d2)    -> cnt[2],cnt[3]
// Combinational.
module comp_8_4 (
  input  logic [7:0] x,
  output logic [3:0] cnt
);
  logic s1, s2, s3, c1, c2, c3, c4, t, d1, d2;

  fa_mux u_fa0 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),     .co(c1));
  fa_mux u_fa1 (.a(x[3]), .b(x[4]), .ci(x[5]), .s(s2),     .co(c2));
  fa_mux u_fa2 (.a(s1),   .b(s2),   .ci(x[6]), .s(s3),     .co(c3));
  ha_mux u_ha0 (.a(s3),   .b(x[7]),              .s(cnt[0]), .co(c4));
  fa_mux u_fa3 (.a(c1),   .b(c2),   .ci(c3),   .s(t),      .co(d1));
  ha_mux u_ha1 (.a(t),    .b(c4),                .s(cnt[1]), .co(d2));
  ha_mux u_ha2 (.a(d1),   .b(d2),                .s(cnt[2]), .co(cnt[3]));
endmodule
