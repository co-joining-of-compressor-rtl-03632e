// vedic_pkg: sizes shared by the 8x8 Vedic multiplier and its compressors.
//
// OP_WIDTH and PROD_WIDTH are the operand and product widths of the
// multiplier (8 and 16). cnt_width(n) is the number of output bits an
// n-input compressor needs to hold a count of up to n ones, ceil(log2(n+1)):
// 2 bits for 2..3 inputs, 3 bits for 4..7 inputs, 4 bits for 8..15 inputs.
// MAX_COMP_IN is the widest compressor of the design (10 inputs, used by the
// two central product columns).
package vedic_pkg;
  localparam int OP_WIDTH    = 8;
  localparam int PROD_WIDTH  = 2 * OP_WIDTH;
  localparam int MAX_COMP_IN = 10;

  function automatic int cnt_width(input int n);
    return $clog2(n + 1);
  endfunction
endpackage
