// comp_5_3: 5-3 compressor, counts the ones among five bits of equal weight.
//
// cnt = x[0] + ... + x[4] (0..5) as a 3-bit binary number; with all inputs
// at 1 the output is 101. cnt[0] is the sum bit, cnt[1] and cnt[2] carries of
// weight 2 and 4. Only multiplexer-based full and half adders are used, as in
// the design description; their arrangement is this design's own:
//   weight 1: FA(x0,x1,x2) -> s1,c1   FA(s1,x3,x4) -> cnt[0],c2
//   weight 2: HA(c1,c2)    -> cnt[1],cnt[2]
// Combinational.
module comp_5_3 (
  input  logic [4:0] x,
  output logic [2:0] cnt
);
  logic s1, c1, c2;

  fa_mux u_fa0 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),     .co(c1));
  fa_mux u_fa1 (.a(s1),   .b(x[3]), .ci(x[4]), .s(cnt[0]), .co(c2));
  ha_mux u_ha0 (.a(c1),   .b(c2),                .s(cnt[1]), .co(cnt[2]));
endmodule
