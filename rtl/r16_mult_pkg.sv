// Shared types and helpers of the radix-16 sequential multiplier.
//
// adder_e names the five final carry-propagate adder architectures the
// multiplier can be built with (Kogge-Stone, Sklansky, Brent-Kung, carry
// look-ahead with blocking factor 4, carry select). The choice is a
// parameter of the multiplier; carry look-ahead is the default.
// radix_bits() gives the group width g = log2(radix) of a partial product
// reduction CSA: 1 for radix 2, 2 for radix 4, 4 for radix 16.
package r16_mult_pkg;

  typedef enum logic [2:0] {
    ADD_KS  = 3'd0,
    ADD_SK  = 3'd1,
    ADD_BK  = 3'd2,
    ADD_CLA = 3'd3,
    ADD_CSL = 3'd4
  } adder_e;

  function automatic int radix_bits(int radix);
    case (radix)
      2:       return 1;
      4:       return 2;
      default: return 4;
    endcase
  endfunction

endpackage
