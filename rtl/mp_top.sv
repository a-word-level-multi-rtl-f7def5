// Word-level multi-precision systolic array core.
//
// An N x N output-stationary array of word-parallel PEs (mp_array) computes
// one output tile O[r][c] = sum_m X_r[m] * W_c[m] per start, with 16-bit,
// 8-bit or 4-bit ifmaps and weights (see mp_pe / mp_selprec for the lane
// meaning). Around it:
//   - N IBUFs (mp_opbuf), one per row, hold the row's ifmap words X_r[m];
//   - N WBUFs (mp_opbuf), one per column, hold the column's weight words W_c[m];
//   - mp_ctrl reads step m of all buffers at once, injects the words at the
//     diagonal PEs, broadcasts the precision pair, and drains the result;
//   - N output buffers (mp_obuf) below the columns collect the drained tile.
//
// Host interface: write ifmap words with ib_we/ib_row/ib_addr/ib_wdata and
// weight words with wb_we/wb_col/wb_addr/wb_wdata while idle; pulse start
// with m_len (1..DEPTH) and mode_in (ifmap and weight precision); wait for
// done (busy is high meanwhile, last_cycles then holds the tile's cycle
// count); read PE (ob_row, ob_col)'s
// LANES results on ob_rdata one clock after presenting the address. Larger
// matrices are processed tile by tile by reloading the buffers.
//
// The array organisation, buffer placement and control split follow the
// paper; buffer depth, accumulator width and the host interface are this
// design's choice.
module mp_top
  import mp_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned DEPTH = 4608,
  parameter int unsigned ACC_W = 48,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ifmap buffer write port
  input  logic                     ib_we,
  input  logic [RW-1:0]            ib_row,
  input  logic [AW-1:0]            ib_addr,
  input  logic [XW-1:0]            ib_wdata,
  // weight buffer write port
  input  logic                     wb_we,
  input  logic [RW-1:0]            wb_col,
  input  logic [AW-1:0]            wb_addr,
  input  logic [WW-1:0]            wb_wdata,
  // tile control
  input  logic                     start,
  input  logic [AW:0]              m_len,
  input  mode_t                    mode_in,
  output logic                     busy,
  output logic                     done,
  output logic [31:0]              last_cycles,
  // output buffer read port
  input  logic [RW-1:0]            ob_row,
  input  logic [RW-1:0]            ob_col,
  output logic signed [ACC_W-1:0]  ob_rdata [LANES]
);

  mode_t                   mode;
  logic [AW-1:0]           rd_addr;
  logic                    inj_valid, inj_first, drain_en, o_we;
  logic [RW-1:0]           o_row;
  logic [XW-1:0]           row_x   [N];
  tok_t                    row_tok [N];
  logic [WW-1:0]           col_w   [N];
  logic signed [ACC_W-1:0] out_acc [N][LANES];
  logic signed [ACC_W-1:0] ob_col_data [N][LANES];
  logic [RW-1:0]           ob_col_q;

  mp_ctrl #(.N (N), .DEPTH (DEPTH)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .m_len       (m_len),
    .mode_in     (mode_in),
    .mode        (mode),
    .rd_addr     (rd_addr),
    .inj_valid   (inj_valid),
    .inj_first   (inj_first),
    .drain_en    (drain_en),
    .ob_we       (o_we),
    .ob_row      (o_row),
    .busy        (busy),
    .done        (done),
    .last_cycles (last_cycles)
  );

  for (genvar i = 0; i < N; i++) begin : g_edge
    mp_opbuf #(.WIDTH (XW), .DEPTH (DEPTH)) u_ibuf (
      .clk   (clk),
      .we    (ib_we && (ib_row == RW'(i))),
      .waddr (ib_addr),
      .wdata (ib_wdata),
      .raddr (rd_addr),
      .rdata (row_x[i])
    );
    mp_opbuf #(.WIDTH (WW), .DEPTH (DEPTH)) u_wbuf (
      .clk   (clk),
      .we    (wb_we && (wb_col == RW'(i))),
      .waddr (wb_addr),
      .wdata (wb_wdata),
      .raddr (rd_addr),
      .rdata (col_w[i])
    );
    assign row_tok[i] = '{valid: inj_valid, first: inj_first};
    mp_obuf #(.N (N), .ACC_W (ACC_W)) u_obuf (
      .clk     (clk),
      .wr_en   (o_we),
      .wr_row  (o_row),
      .wr_data (out_acc[i]),
      .rd_row  (ob_row),
      .rd_data (ob_col_data[i])
    );
  end

  mp_array #(.N (N), .ACC_W (ACC_W)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (mode),
    .row_x    (row_x),
    .row_tok  (row_tok),
    .col_w    (col_w),
    .drain_en (drain_en),
    .out_acc  (out_acc)
  );

  always_ff @(posedge clk) ob_col_q <= ob_col;
  assign ob_rdata = ob_col_data[ob_col_q];

endmodule
