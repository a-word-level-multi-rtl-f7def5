// Full-size workload testbench: mp_top with its default parameters (16 x 16
// PEs, 64-word buffers) multiplies a 49 x 16 ifmap matrix A by a 16 x 49
// weight matrix B, the matrix product used to compare systolic dataflows,
// once in each precision mode, tiling the 49 x 49 result over the array:
//   16-bit: one ifmap row per PE row, one weight column per PE column,
//           16 steps per tile, 4 x 4 = 16 tiles;
//   8-bit:  two ifmap rows per PE row (X = {A[2r+1], A[2r]}) and two weight
//           columns per PE column, 16 steps, 2 x 2 = 4 tiles;
//   4-bit:  two ifmap rows per PE row and four weight columns per PE column;
//           each step consumes two reduction indices (the two multipliers of
//           a word), so 8 steps per tile and 2 x 1 = 2 tiles.
// Every element of the result is compared with a plain integer matrix
// product, and the array's busy cycles are summed and compared with
// tiles * (M + N/2 + 1 + N); the analytical ring-dataflow model and the
// boundary-fed model are printed for comparison.
module tb_mp_matmul;
  import mp_pkg::*;
  import mp_tb_pkg::*;

  localparam int N = 16, DEPTH = 4608, ACC_W = 48;
  localparam int SR = 49, SM = 16, SC = 49;
  logic clk = 0, rst_n = 0;
  logic ib_we = 0, wb_we = 0, start = 0;
  logic [3:0] ib_row = '0, wb_col = '0, ob_row = '0, ob_col = '0;
  logic [12:0] ib_addr = '0, wb_addr = '0;
  logic [15:0] ib_wdata = '0;
  logic [31:0] wb_wdata = '0;
  logic [13:0] m_len = 14'd1;
  mode_t mode_in = '{x: PREC16, w: PREC16};
  logic busy, done;
  logic [31:0] last_cycles;
  logic signed [ACC_W-1:0] ob_rdata [LANES];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mp_top dut (.*);

  initial begin
    @(posedge clk);
    while (cyc < 400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int A [SR][SM];
  int B [SM][SC];
  longint O [SR][SC];
  longint G [SR][SC];

  function automatic int rnd(int bits);
    return $urandom_range(0, (1 << bits) - 1) - (1 << (bits - 1));
  endfunction
  function automatic int a_at(int r, int m);
    return (r < SR && m < SM) ? A[r][m] : 0;
  endfunction
  function automatic int b_at(int m, int c);
    return (c < SC && m < SM) ? B[m][c] : 0;
  endfunction

  task automatic put(int r, int c, longint v);
    if (r < SR && c < SC) G[r][c] = v;
  endtask

  task automatic run_tile(prec_t p, int m, output int cycles);
    @(negedge clk);
    ib_we = 0; wb_we = 0;
    start = 1; m_len = 14'(m); mode_in = same(p);
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    cycles = int'(last_cycles);
    @(negedge clk);
  endtask

  task automatic run_mode(prec_t p);
    int bits, rows_pe, cols_pe, steps, tiles, total, cyc_t;
    logic [15:0] x;
    logic [31:0] w;
    bits    = (p == PREC16) ? 16 : (p == PREC8) ? 8 : 4;
    rows_pe = (p == PREC16) ? 1 : 2;
    cols_pe = (p == PREC16) ? 1 : (p == PREC8) ? 2 : 4;
    steps   = (p == PREC4) ? SM / 2 : SM;
    for (int r = 0; r < SR; r++) for (int m = 0; m < SM; m++) A[r][m] = rnd(bits);
    for (int m = 0; m < SM; m++) for (int c = 0; c < SC; c++) B[m][c] = rnd(bits);
    for (int r = 0; r < SR; r++)
      for (int c = 0; c < SC; c++) begin
        O[r][c] = 0;
        for (int m = 0; m < SM; m++) O[r][c] += longint'(A[r][m]) * longint'(B[m][c]);
      end
    total = 0; tiles = 0;
    for (int rb = 0; rb < SR; rb += N * rows_pe)
      for (int cb = 0; cb < SC; cb += N * cols_pe) begin
        // load IBUFs and WBUFs for this tile
        for (int i = 0; i < N; i++)
          for (int s = 0; s < steps; s++) begin
            case (p)
              PREC16: begin
                x = 16'(a_at(rb + i, s));
                w = {16'h0, 16'(b_at(s, cb + i))};
              end
              PREC8: begin
                x = {8'(a_at(rb + 2*i + 1, s)), 8'(a_at(rb + 2*i, s))};
                w = {16'h0, 8'(b_at(s, cb + 2*i + 1)), 8'(b_at(s, cb + 2*i))};
              end
              default: begin
                x = {4'(a_at(rb + 2*i + 1, 2*s + 1)), 4'(a_at(rb + 2*i + 1, 2*s)),
                     4'(a_at(rb + 2*i, 2*s + 1)),     4'(a_at(rb + 2*i, 2*s))};
                for (int k = 0; k < 4; k++) begin
                  w[4*k +: 4]      = 4'(b_at(2*s,     cb + 4*i + k));
                  w[16 + 4*k +: 4] = 4'(b_at(2*s + 1, cb + 4*i + k));
                end
              end
            endcase
            @(negedge clk);
            ib_we = 1; ib_row = 4'(i); ib_addr = 13'(s); ib_wdata = x;
            wb_we = 1; wb_col = 4'(i); wb_addr = 13'(s); wb_wdata = w;
          end
        run_tile(p, steps, cyc_t);
        total += cyc_t;
        tiles++;
        // gather the tile's results
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            ob_row = 4'(r); ob_col = 4'(c);
            @(negedge clk);
            case (p)
              PREC16: put(rb + r, cb + c, ob_rdata[0]);
              PREC8: begin
                put(rb + 2*r,     cb + 2*c + 1, ob_rdata[0]);
                put(rb + 2*r,     cb + 2*c,     ob_rdata[1]);
                put(rb + 2*r + 1, cb + 2*c + 1, ob_rdata[2]);
                put(rb + 2*r + 1, cb + 2*c,     ob_rdata[3]);
              end
              default:
                for (int j = 0; j < 4; j++) begin
                  put(rb + 2*r,     cb + 4*c + 3 - j, ob_rdata[j]);
                  put(rb + 2*r + 1, cb + 4*c + 3 - j, ob_rdata[4 + j]);
                end
            endcase
          end
      end
    for (int r = 0; r < SR; r++)
      for (int c = 0; c < SC; c++) begin
        checks++;
        if (G[r][c] != O[r][c]) begin
          failures++;
          if (failures < 10) $display("%0d-bit O[%0d][%0d] got %0d exp %0d", bits, r, c, G[r][c], O[r][c]);
        end
      end
    checks++;
    if (total != tiles * (steps + N / 2 + 1 + N)) begin
      failures++;
      $display("%0d-bit: %0d busy cycles, expected %0d", bits, total, tiles * (steps + N / 2 + 1 + N));
    end
    $display("%0d-bit 49x16 * 16x49: %0d tiles, %0d cycles (ring model %0d, boundary-fed model %0d)",
             bits, tiles, total, tiles * (N + steps + (N + 1) / 2 - 1),
             tiles * (2 * N + N + steps - 2));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_mode(PREC16);
    run_mode(PREC8);
    run_mode(PREC4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
