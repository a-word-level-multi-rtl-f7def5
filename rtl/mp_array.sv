// N x N ring-based diagonal systolic array of word-parallel PEs,
// output-stationary.
//
// Row r's ifmap stream and column c's weight stream both enter at the
// diagonal PE (r,r) / (c,c). From there X travels east and west along its row
// and W travels north and south along its column, one PE per clock, wrapping
// around at the array edge so that each row and column forms a ring. PE (r,c)
// lies e = (c - r) mod N hops east of its row's entry point and the same e hops
// north of its column's entry point; it takes the east/north chains when
// e <= N/2 and the west/south chains otherwise, so no operand travels more
// than N/2 hops and X and W of the same step always meet in the same cycle
// without any input skew. Pre-filling the whole array thus takes N/2 + 1
// cycles (3 cycles for 5 x 5) instead of 2N - 1 in a boundary-fed array.
//
// When drain_en is high all accumulators shift one row down per clock; the
// bottom row appears on out_acc, bottom row first, so N cycles drain a tile.
// The diagonal injection, ring wrap-around and column drain towards the bottom
// output buffers follow the paper; the square shape (one diagonal) and the
// choice of chain at e = N/2 for even N are this design's choice.
module mp_array
  import mp_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned ACC_W = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mode_t                    mode,
  input  logic [XW-1:0]            row_x   [N],
  input  tok_t                     row_tok [N],
  input  logic [WW-1:0]            col_w   [N],
  input  logic                     drain_en,
  output logic signed [ACC_W-1:0]  out_acc [N][LANES]
);

  logic [XW-1:0]           xe [N][N];
  logic [XW-1:0]           xw [N][N];
  tok_t                    te [N][N];
  tok_t                    tw [N][N];
  logic [WW-1:0]           ws [N][N];
  logic [WW-1:0]           wn [N][N];
  logic signed [ACC_W-1:0] acc  [N][N][LANES];
  logic signed [ACC_W-1:0] acc_top [N][N][LANES];  // drain input of each PE

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      localparam int unsigned E  = (c + N - r) % N;
      localparam int unsigned CW = (c + N - 1) % N;  // west neighbour column
      localparam int unsigned CE = (c + 1) % N;      // east neighbour column
      localparam int unsigned RN = (r + N - 1) % N;  // north neighbour row
      localparam int unsigned RS = (r + 1) % N;      // south neighbour row
      mp_pe #(
        .ACC_W        (ACC_W),
        .IS_DIAG      (r == c),
        .X_FROM_WEST  (E <= N / 2),
        .W_FROM_SOUTH (E <= N / 2)
      ) u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .mode     (mode),
        .inj_x    (row_x[r]),
        .inj_tok  (row_tok[r]),
        .inj_w    (col_w[c]),
        .xe_in    (xe[r][CW]),
        .te_in    (te[r][CW]),
        .xe_out   (xe[r][c]),
        .te_out   (te[r][c]),
        .xw_in    (xw[r][CE]),
        .tw_in    (tw[r][CE]),
        .xw_out   (xw[r][c]),
        .tw_out   (tw[r][c]),
        .ws_in    (ws[RN][c]),
        .ws_out   (ws[r][c]),
        .wn_in    (wn[RS][c]),
        .wn_out   (wn[r][c]),
        .drain_en (drain_en),
        .acc_in   (acc_top[r][c]),
        .acc_out  (acc[r][c])
      );
      if (r == 0) begin : g_first
        always_comb for (int j = 0; j < LANES; j++) acc_top[r][c][j] = '0;
      end else begin : g_next
        assign acc_top[r][c] = acc[r-1][c];
      end
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_out
    assign out_acc[c] = acc[N-1][c];
  end

endmodule
