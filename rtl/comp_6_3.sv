// comp_6_3: 6-3 compressor, counts the ones among six bits of equal weight.
//
// cnt = x[0] + ... + x[5] (0..6) as a 3-bit binary number. cnt[0] is the sum
// bit, cnt[1] and cnt[2] carries of weight 2 and 4. Only multiplexer-based
// full and half adders are used, as in the design description; their
// arrangement is this design's own:
//   weight 1: FA(x0,x1,x2) -> s1,c1   FA(x3,x4,x5) -> s2,c2
//             HA(s1,s2)    -> cnt[0],c3
//   weight 2: FA(c1,c2,c3) -> cnt[1],cnt[2]
// Combinational.
module comp_6_3 (
  input  logic [5:0] x,
  output logic [2:0] cnt
);
  logic s1, s2, c1, c2, c3;

  fa_mux u_fa0 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),     .co(c1));
  fa_mux u_fa1 (.a(x[3]), .b(x[4]), .ci(x[5]), .s(s2),     .co(c2));
  ha_mux u_ha0 (.a(s1),   .b(s2),                .s(cnt[0]), .co(c3));
  fa_mux u_fa2 (.a(c1),   .b(c2),   .ci(c3),   .s(cnt[1]), .co(cnt[2]));
endmodule
