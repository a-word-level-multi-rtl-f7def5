// Word-parallel processing element (PE) of the ring-based diagonal systolic
// array, output-stationary.
//
// Datapath: the 16-bit ifmap word X carries nibbles x0..x3 and the 32-bit
// weight word carries nibbles w0..w3 (bits 15:0) and a second set wb0..wb3
// (bits 31:16, used only with 4-bit ifmaps and weights). Sixteen 4b x 4b multipliers are
// grouped in eight words: word k (k=0..3) multiplies weight nibble k with
// x1:x0, word k+4 multiplies the same weight nibble with x3:x2. The selective
// precision tree turns the eight word psums into 1, 4 or 8 lane products, which
// are accumulated in LANES accumulators that stay in the PE for a whole tile.
//
// Operand transport: each PE holds four operand registers, one per ring
// direction (X travelling east and west, W travelling south and north). A
// diagonal PE (IS_DIAG) takes its operands straight from the row and column
// buses and starts all four chains; every other PE forwards the chains one hop
// per clock and picks the chain that reaches it first (X_FROM_WEST,
// W_FROM_SOUTH, set by the array from the PE position). The valid/first token
// travels with X. A PE that is d hops from the diagonal therefore works on the
// operands injected d cycles earlier.
//
// Drain: while drain_en is high the accumulators shift one PE down the column
// (acc_in from the PE above, acc_out to the PE below), ending in the output
// buffer below the array.
//
// Timing: one MAC step per clock; accumulators update on the rising edge after
// a valid operand is present. Synchronous active-low reset clears tokens and
// accumulators. The word organisation, diagonal injection, ring propagation and
// output-stationary accumulation follow the paper; the register placement, the
// token, the signed number format and the accumulator width are this design's
// choice.
module mp_pe
  import mp_pkg::*;
#(
  parameter int unsigned ACC_W        = 48,
  parameter bit          IS_DIAG      = 1'b0,
  parameter bit          X_FROM_WEST  = 1'b1,  // use the east-travelling X chain
  parameter bit          W_FROM_SOUTH = 1'b1   // use the north-travelling W chain
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mode_t                    mode,   // ifmap / weight precision
  // row / column injection buses (used by the diagonal PE only)
  input  logic [XW-1:0]            inj_x,
  input  tok_t                     inj_tok,
  input  logic [WW-1:0]            inj_w,
  // ring links, X east-travelling and west-travelling
  input  logic [XW-1:0]            xe_in,
  input  tok_t                     te_in,
  output logic [XW-1:0]            xe_out,
  output tok_t                     te_out,
  input  logic [XW-1:0]            xw_in,
  input  tok_t                     tw_in,
  output logic [XW-1:0]            xw_out,
  output tok_t                     tw_out,
  // ring links, W south-travelling and north-travelling
  input  logic [WW-1:0]            ws_in,
  output logic [WW-1:0]            ws_out,
  input  logic [WW-1:0]            wn_in,
  output logic [WW-1:0]            wn_out,
  // output drain along the column
  input  logic                     drain_en,
  input  logic signed [ACC_W-1:0]  acc_in  [LANES],
  output logic signed [ACC_W-1:0]  acc_out [LANES]
);

  logic [XW-1:0] xe_q, xw_q;
  tok_t          te_q, tw_q;
  logic [WW-1:0] ws_q, wn_q;

  always_ff @(posedge clk) begin
    xe_q <= xe_in;
    xw_q <= xw_in;
    ws_q <= ws_in;
    wn_q <= wn_in;
    if (!rst_n) begin
      te_q <= '0;
      tw_q <= '0;
    end else begin
      te_q <= te_in;
      tw_q <= tw_in;
    end
  end

  // A diagonal PE restarts every chain with the injected operands.
  assign xe_out = IS_DIAG ? inj_x   : xe_q;
  assign te_out = IS_DIAG ? inj_tok : te_q;
  assign xw_out = IS_DIAG ? inj_x   : xw_q;
  assign tw_out = IS_DIAG ? inj_tok : tw_q;
  assign ws_out = IS_DIAG ? inj_w   : ws_q;
  assign wn_out = IS_DIAG ? inj_w   : wn_q;

  logic [XW-1:0] x_op;
  tok_t          t_op;
  logic [WW-1:0] w_op;

  assign x_op = X_FROM_WEST  ? xe_out : xw_out;
  assign t_op = X_FROM_WEST  ? te_out : tw_out;
  assign w_op = W_FROM_SOUTH ? wn_out : ws_out;

  // Nibble extension for the current precision.
  logic signed [4:0] xn [4];
  logic signed [4:0] wa [4];
  logic signed [4:0] wb [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      xn[i] = nib_ext(x_op[4*i +: 4], nib_is_top(mode.x, i));
      wa[i] = nib_ext(w_op[4*i +: 4], nib_is_top(mode.w, i));
      wb[i] = (mode.x == PREC4) ? nib_ext(w_op[16 + 4*i +: 4], 1'b1) : wa[i];
    end
  end

  logic signed [15:0]       psum [8];
  logic signed [PROD_W-1:0] lane [LANES];

  for (genvar k = 0; k < 4; k++) begin : g_col
    mp_word u_top (
      .xprec (mode.x), .w_a (wa[k]), .w_b (wb[k]),
      .x_lo (xn[0]), .x_hi (xn[1]), .psum (psum[k])
    );
    mp_word u_bot (
      .xprec (mode.x), .w_a (wa[k]), .w_b (wb[k]),
      .x_lo (xn[2]), .x_hi (xn[3]), .psum (psum[k+4])
    );
  end

  mp_selprec u_sel (.mode (mode), .psum (psum), .lane (lane));

  logic signed [ACC_W-1:0] acc [LANES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < LANES; j++) acc[j] <= '0;
    end else if (drain_en) begin
      for (int j = 0; j < LANES; j++) acc[j] <= acc_in[j];
    end else if (t_op.valid) begin
      for (int j = 0; j < LANES; j++)
        acc[j] <= (t_op.first ? ACC_W'(0) : acc[j]) + ACC_W'(lane[j]);
    end
  end

  assign acc_out = acc;

endmodule
