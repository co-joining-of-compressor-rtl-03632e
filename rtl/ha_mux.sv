// ha_mux: half adder (2-2 compressor) built from 2:1 multiplexers.
//
// Adds two bits of equal weight into a sum bit s and a carry bit co.
// Operand a drives the select lines of both multiplexers:
//   s  = a ? ~b : b    (a XOR b)
//   co = a ?  b : 0    (a AND b)
// Combinational. Building the half adder from multiplexers follows the
// design description; the exact wiring above is the standard multiplexer
// half adder chosen here.
module ha_mux (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  mux2 u_sum   (.d0(b),    .d1(~b), .s(a), .y(s));
  mux2 u_carry (.d0(1'b0), .d1(b),  .s(a), .y(co));
endmodule
