// Shared definitions of the word-level multi-precision systolic array.
//
// The ifmap (X) and weight (W) operands each have a precision of 16, 8 or 4
// bits, two's-complement fixed point; the pair is broadcast to every PE as a
// mode_t. Supported pairs: X16 or X8 with W16, W8 or W4, and X4 with W4.
// Every operand is split into 4-bit sub-words (nibbles); a nibble is
// sign-extended to 5 bits when it is the most significant nibble of an
// element in the current mode and zero-extended otherwise, so that a signed
// 5x5 multiplier per nibble pair reproduces the signed product after shifting.
// The precisions, their pairing and the nibble decomposition follow the
// paper; the signed number format and the 5-bit extension are this design's choice.
package mp_pkg;

  // Precision of one operand.
  typedef enum logic [1:0] {
    PREC16 = 2'd0,
    PREC8  = 2'd1,
    PREC4  = 2'd2
  } prec_t;

  // Precision pair of a tile.
  typedef struct packed {
    prec_t x;
    prec_t w;
  } mode_t;

  // Output lanes of one PE: 1 used in 16-bit mode, 4 in 8-bit, 8 in 4-bit.
  localparam int unsigned LANES  = 8;
  // Ifmap word (four nibbles) and weight word (two sets of four nibbles).
  localparam int unsigned XW     = 16;
  localparam int unsigned WW     = 32;
  // Width of one lane product as produced by the selective-precision tree.
  localparam int unsigned PROD_W = 32;

  // Token that travels with the ifmap operand through the array.
  typedef struct packed {
    logic valid;   // operand pair is a real MAC step
    logic first;   // first step of a tile: restart the accumulators
  } tok_t;

  // True when nibble position pos (0..3) is the top nibble of an element.
  function automatic logic nib_is_top(prec_t p, int unsigned pos);
    case (p)
      PREC16:  return pos == 3;
      PREC8:   return (pos == 1) || (pos == 3);
      default: return 1'b1;
    endcase
  endfunction

  // Extend a nibble to a signed 5-bit multiplier operand.
  function automatic logic signed [4:0] nib_ext(logic [3:0] n, logic is_top);
    return is_top ? {n[3], n} : {1'b0, n};
  endfunction

endpackage
