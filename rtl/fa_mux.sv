// fa_mux: full adder (3-2 compressor) built from 2:1 multiplexers.
//
// Adds three bits of equal weight into a sum bit s and a carry bit co.
// A first multiplexer forms the propagate signal p = a XOR b (a selects
// between b and ~b); p then selects
//   s  = p ? ~ci : ci   (a XOR b XOR ci)
//   co = p ?  ci : a    (majority of a, b, ci: when a = b the carry is a)
// Combinational, three multiplexers deep on the sum path. Using multiplexers
// follows the design description; this wiring is the standard multiplexer
// full adder chosen here.
module fa_mux (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;

  mux2 u_prop  (.d0(b),  .d1(~b),  .s(a), .y(p));
  mux2 u_sum   (.d0(ci), .d1(~ci), .s(p), .y(s));
  mux2 u_carry (.d0(a),  .d1(ci),  .s(p), .y(co));
endmodule
