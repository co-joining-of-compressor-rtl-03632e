// comp_4_3: 4-3 compressor, counts the ones among four bits of equal weight.
//
// cnt = x[0] + x[1] + x[2] + x[3] (0..4) as a 3-bit binary number; cnt[0]
// is the column's sum bit, cnt[1] and cnt[2] are carries of weight 2 and 4.
// Only multiplexer-based full and half adders are used, as in the design
// description; their arrangement is this design's own:
//   weight 1: FA(x0,x1,x2) -> s1,c1   HA(s1,x3) -> cnt[0],c2
//   weight 2: HA(c1,c2)    -> cnt[1],cnt[2]
// Combinational.
module comp_4_3 (
  input  logic [3:0] x,
  output logic [2:0] cnt
);
  logic s1, c1, c2;

  fa_mux u_fa0 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),     .co(c1));
  ha_mux u_ha0 (.a(s1),   .b(x[3]),              .s(cnt[0]), .co(c2));
  ha_mux u_ha1 (.a(c1),   .b(c2),                .s(cnt[1]), .co(cnt[2]));
endmodule
