// One "word" of the word-parallel PE: two 4b x 4b multipliers placed next to
// each other along the X dimension, a 4-bit shifter and an adder.
//
// Multiplier 0 forms w_a * x_lo and multiplier 1 forms w_b * x_hi. With 16-bit
// and 8-bit ifmaps the two X nibbles belong to one element, so the second
// product is shifted left by 4 before the add and the word yields a 4-bit x
// 8-bit product. With 4-bit ifmaps the two nibbles are two separate ifmap
// values (two input channels), so the products are added without a shift and
// the word yields a two-term dot product. The grouping of two multipliers
// into a word with a shifter and adder follows the paper (Fig. 2(d)); feeding
// the second multiplier its own weight nibble in 4-bit mode is this design's
// choice. Operands are already sign/zero-extended to 5 bits. Purely
// combinational.
module mp_word
  import mp_pkg::*;
(
  input  prec_t              xprec, // ifmap precision
  input  logic signed [4:0]  w_a,   // weight nibble for multiplier 0
  input  logic signed [4:0]  w_b,   // weight nibble for multiplier 1
  input  logic signed [4:0]  x_lo,  // lower ifmap nibble of the pair
  input  logic signed [4:0]  x_hi,  // upper ifmap nibble of the pair
  output logic signed [15:0] psum
);

  logic signed [9:0] p0, p1;

  always_comb begin
    p0 = w_a * x_lo;
    p1 = w_b * x_hi;
    if (xprec == PREC4) psum = 16'(p0) + 16'(p1);
    else               psum = 16'(p0) + (16'(p1) <<< 4);
  end

endmodule
