// Test driver for one mp_array of size N x N, used by tb_mp_array. Runs
// TILES random tiles (every supported precision pair and reduction length), feeding
// row r's ifmap stream and column c's weight stream on the diagonal injection
// buses without any skew. After the last step it waits exactly N/2 clocks
// (the longest ring distance), then drains for N clocks and compares every
// PE's lanes, arriving bottom row first, with the element-level reference
// O[r][c] = sum_m X_r[m] * W_c[m]. Reports its counts on the output ports.
module mp_array_tester
  import mp_pkg::*;
  import mp_tb_pkg::*;
#(
  parameter int N     = 5,
  parameter int TILES = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int ACC_W = 40;
  localparam int MMAX  = 20;

  mode_t                   mode = '{x: PREC16, w: PREC16};
  logic [XW-1:0]           row_x   [N];
  tok_t                    row_tok [N];
  logic [WW-1:0]           col_w   [N];
  logic                    drain_en = 1'b0;
  logic signed [ACC_W-1:0] out_acc [N][LANES];

  mp_array #(.N(N), .ACC_W(ACC_W)) dut (
    .clk, .rst_n, .mode, .row_x, .row_tok, .col_w, .drain_en, .out_acc);

  logic [XW-1:0] xs [N][MMAX];
  logic [WW-1:0] wv [N][MMAX];

  initial begin
    int m_len;
    longint exp;
    checks = 0; failures = 0; finished = 0;
    for (int i = 0; i < N; i++) begin
      row_x[i] = '0; row_tok[i] = '0; col_w[i] = '0;
    end
    @(posedge rst_n);
    for (int t = 0; t < TILES; t++) begin
      mode  = MODES[t % 7];
      m_len = (t < 7) ? 1 : $urandom_range(1, MMAX);
      for (int i = 0; i < N; i++)
        for (int s = 0; s < m_len; s++) begin
          xs[i][s] = 16'($urandom);
          wv[i][s] = rand_w(mode.w);
        end
      for (int s = 0; s < m_len; s++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          row_x[i]   = xs[i][s];
          col_w[i]   = wv[i][s];
          row_tok[i] = '{valid: 1'b1, first: (s == 0)};
        end
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) row_tok[i] = '0;
      repeat (N / 2) @(negedge clk);
      drain_en = 1'b1;
      for (int k = 0; k < N; k++) begin
        // out_acc now holds row N-1-k
        for (int c = 0; c < N; c++)
          for (int j = 0; j < LANES; j++) begin
            exp = 0;
            for (int s = 0; s < m_len; s++) exp += lane_ref(mode, xs[N-1-k][s], wv[c][s], j);
            checks++;
            if (longint'(out_acc[c][j]) != exp) begin
              failures++;
              if (failures < 10) $display("N=%0d tile %0d PE(%0d,%0d) lane %0d got %0d exp %0d",
                                          N, t, N-1-k, c, j, out_acc[c][j], exp);
            end
          end
        @(negedge clk);
      end
      drain_en = 1'b0;
    end
    finished = 1;
  end
endmodule
