// mux2: 2:1 multiplexer, the basic cell of the multiplexer-based adders.
//
// y = s ? d1 : d0. Purely combinational. Every half adder and full adder of
// the multiplier is built from this cell plus inverters, which is the point
// of the design: a multiplexer path replaces the XOR/AND gate path of a
// conventional adder.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic s,
  output logic y
);
  assign y = s ? d1 : d0;
endmodule
