// vedic_pp_gen: partial product array of the vertically-and-crosswise
// (Urdhva-Tiryakbhyam) multiplier.
//
// pp[i][j] = a[i] AND b[j], the term written AiBj in the column equations.
// Product column k sums every pp[i][j] with i + j = k. All WIDTH*WIDTH terms
// are formed at once, in parallel, before any addition starts, which is the
// property the vertically-and-crosswise method relies on. Combinational.
// WIDTH defaults to the 8 bits of the design.
module vedic_pp_gen #(
  parameter int WIDTH = vedic_pkg::OP_WIDTH
) (
  input  logic [WIDTH-1:0]            a,
  input  logic [WIDTH-1:0]            b,
  output logic [WIDTH-1:0][WIDTH-1:0] pp   // pp[i][j] = a[i] & b[j]
);
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      pp[i] = a[i] ? b : '0;
    end
  end
endmodule
