// Selective-precision adder tree of the word-parallel PE.
//
// Takes the psums of the eight words (words 0..3 see ifmap nibbles 1:0, words
// 4..7 see nibbles 3:2; word k and word k+4 share weight nibble column k) and
// forms the PE outputs for the current precision pair. Word (r, k), r = 0 for
// the upper row of words and 1 for the lower, contributes
//   psum << (4 * (k mod WN) + (X16 ? 8 * r : 0))
// to lane (X16 ? 0 : r) * NW + (NW - 1 - k / WN), where WN is the number of
// nibbles per weight element (4, 2, 1 for W16, W8, W4) and NW = 4 / WN the
// number of weight elements. Equal precisions give:
//   16-bit: lane0 = all eight psums summed: the full 16x16 product;
//   8-bit:  lane0 = words 3,2; lane1 = words 1,0; lane2 = words 7,6;
//           lane3 = words 5,4 (four 8x8 products);
//   4-bit:  no addition: lane j = word 3-j, lane 4+j = word 7-j.
// Mixed pairs give 2 lanes (X16/W8, X8/W16), 4 lanes (X16/W4) or 8 lanes
// (X8/W4). The groupings, their output counts and the lane order of the equal
// modes follow the paper; the lane order of the mixed pairs extends it in the
// same pattern. Unused lanes are zero. Purely combinational.
module mp_selprec
  import mp_pkg::*;
(
  input  mode_t                     mode,
  input  logic signed [15:0]        psum [8],
  output logic signed [PROD_W-1:0]  lane [LANES]
);

  int unsigned wn, nw;
  logic signed [35:0] acc [LANES];

  always_comb begin
    case (mode.w)
      PREC16:  wn = 4;
      PREC8:   wn = 2;
      default: wn = 1;
    endcase
    nw = 4 / wn;
    for (int j = 0; j < LANES; j++) begin
      acc[j] = '0;
      for (int r = 0; r < 2; r++) begin
        for (int k = 0; k < 4; k++) begin
          if (((mode.x == PREC16) ? 0 : r) * nw + (nw - 1 - k / wn) == j)
            acc[j] += 36'(psum[4*r + k]) <<< (4 * (k % wn) + ((mode.x == PREC16) ? 8 * r : 0));
        end
      end
      lane[j] = PROD_W'(acc[j]);
    end
  end

endmodule
