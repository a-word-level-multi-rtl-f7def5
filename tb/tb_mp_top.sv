// End-to-end testbench of mp_top at N = 5 (the paper's dataflow example size)
// and DEPTH = 16. Each tile loads random ifmap words into the 5 IBUFs and
// weight words into the 5 WBUFs over the host ports, starts the tile, waits
// for done, reads all 25 PEs' lanes from the output buffers and compares them
// with the element-level reference. It also checks the tile's cycle count
// against m_len + N/2 + 1 + N (the runtime model of the ring-based dataflow,
// T = R + M + ceil(N/2) - 1, plus one clock of buffer read latency) and
// counts how often each mechanism happened: every supported ifmap/weight
// precision pair, a precision
// switch between tiles, back-to-back tiles that restart the accumulators
// without reset, the shortest and longest reduction length, and a start
// ignored while busy. A mechanism that never happened counts as a failure.
module tb_mp_top;
  import mp_pkg::*;
  import mp_tb_pkg::*;

  localparam int N = 5, DEPTH = 16, ACC_W = 40;
  logic clk = 0, rst_n = 0;
  logic ib_we = 0, wb_we = 0, start = 0;
  logic [2:0] ib_row = '0, wb_col = '0, ob_row = '0, ob_col = '0;
  logic [3:0] ib_addr = '0, wb_addr = '0;
  logic [15:0] ib_wdata = '0;
  logic [31:0] wb_wdata = '0;
  logic [4:0] m_len = 5'd1;
  mode_t mode_in = '{x: PREC16, w: PREC16};
  logic busy, done;
  logic [31:0] last_cycles;
  logic signed [ACC_W-1:0] ob_rdata [LANES];
  int checks = 0, failures = 0, cyc = 0;
  int n_mode [7], n_switch = 0, n_restart = 0, n_mmin = 0, n_mmax = 0, n_ignored = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mp_top #(.N(N), .DEPTH(DEPTH), .ACC_W(ACC_W)) dut (.*);

  initial begin
    @(posedge clk);
    while (cyc < 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s", what);
    end
  endtask

  logic [15:0] xs [N][DEPTH];
  logic [31:0] wv [N][DEPTH];

  initial begin
    int m, t0, elapsed;
    mode_t p, last_p;
    int pi;
    longint exp;
    bit first_tile = 1;
    for (int i = 0; i < 7; i++) n_mode[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      pi = (t < 7) ? t : $urandom_range(0, 6);
      p  = MODES[pi];
      m = (t == 0) ? 1 : (t == 1) ? DEPTH : $urandom_range(1, DEPTH);
      // load the buffers
      for (int i = 0; i < N; i++)
        for (int s = 0; s < m; s++) begin
          xs[i][s] = 16'($urandom);
          wv[i][s] = rand_w(p.w);
          @(negedge clk);
          ib_we = 1; ib_row = 3'(i); ib_addr = 4'(s); ib_wdata = xs[i][s];
          wb_we = 1; wb_col = 3'(i); wb_addr = 4'(s); wb_wdata = wv[i][s];
        end
      @(negedge clk);
      ib_we = 0; wb_we = 0;
      // start the tile
      start = 1; m_len = 5'(m); mode_in = p;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      // a second start during the tile must be ignored
      if (t % 4 == 3) begin
        @(negedge clk);
        start = 1; mode_in = MODES[(pi + 1) % 7]; m_len = 5'(DEPTH);
        @(negedge clk);
        start = 0;
        n_ignored++;
      end
      while (!done) @(negedge clk);
      elapsed = cyc - t0 - 1;
      chk(last_cycles == 32'(m + N / 2 + 1 + N), $sformatf("tile %0d: last_cycles %0d", t, last_cycles));
      chk(elapsed == m + N / 2 + 1 + N, $sformatf("tile %0d: start-to-done %0d", t, elapsed));
      @(negedge clk);
      chk(!busy, "busy after done (ignored start was taken)");
      // read back every PE
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          ob_row = 3'(r); ob_col = 3'(c);
          @(negedge clk);
          for (int j = 0; j < LANES; j++) begin
            exp = 0;
            for (int s = 0; s < m; s++) exp += lane_ref(p, xs[r][s], wv[c][s], j);
            chk(longint'(ob_rdata[j]) == exp,
                $sformatf("tile %0d mode %p PE(%0d,%0d) lane %0d got %0d exp %0d",
                          t, p, r, c, j, ob_rdata[j], exp));
          end
        end
      n_mode[pi]++;
      if (!first_tile) begin
        n_restart++;
        if (p != last_p) n_switch++;
      end
      if (m == 1) n_mmin++;
      if (m == DEPTH) n_mmax++;
      last_p = p;
      first_tile = 0;
    end
    $display("tiles per pair X16W16=%0d X8W8=%0d X4W4=%0d X16W8=%0d X16W4=%0d X8W16=%0d X8W4=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5], n_mode[6]);
    $display("switches=%0d restarts=%0d m_min=%0d m_max=%0d ignored_starts=%0d",
             n_switch, n_restart, n_mmin, n_mmax, n_ignored);
    for (int i = 0; i < 7; i++) chk(n_mode[i] > 0, $sformatf("precision pair %0d never ran", i));
    chk(n_switch > 0, "no precision switch");
    chk(n_restart > 0, "no back-to-back tile");
    chk(n_mmin > 0 && n_mmax > 0, "extreme reduction lengths not run");
    chk(n_ignored > 0, "no start while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
