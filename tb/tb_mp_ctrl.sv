// Testbench of mp_ctrl (N = 5, DEPTH = 16): for every reduction length and
// all seven precision pairs it checks the issued buffer addresses 0..m_len-1,
// the injected valid/first token one clock after each address, the wait of
// N/2+1 clocks, N drain clocks writing rows N-1 down to 0, the done pulse,
// the latched precision, last_cycles = m_len + N/2 + 1 + N, and that a start
// while busy is ignored.
module tb_mp_ctrl;
  import mp_pkg::*;
  import mp_tb_pkg::*;
  localparam int N = 5, DEPTH = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] m_len = 5'd1;
  mode_t mode_in = '{x: PREC16, w: PREC16}, mode;
  logic [3:0] rd_addr;
  logic inj_valid, inj_first, drain_en, ob_we, busy, done;
  logic [2:0] ob_row;
  logic [31:0] last_cycles;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mp_ctrl #(.N(N), .DEPTH(DEPTH)) dut (.*);

  initial begin
    @(posedge clk);
    while (cyc < 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    int m, t, seen_valid, seen_first, drains, exp_row;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 7 * DEPTH; rep++) begin
      m = rep % DEPTH + 1;
      @(negedge clk);
      start = 1; m_len = 5'(m); mode_in = MODES[rep % 7];
      @(negedge clk);
      start = 0; mode_in = MODES[(rep + 1) % 7];
      t = 1; seen_valid = 0; seen_first = 0; drains = 0; exp_row = N - 1;
      // t counts busy cycles; this negedge is busy cycle 1
      while (!done) begin
        chk(busy, "busy low during tile");
        chk(mode == MODES[rep % 7], "precision not held");
        if (t <= m) chk(rd_addr == 4'(t - 1), "wrong read address");
        if (t == 3) begin
          start = 1;  // must be ignored
        end else start = 0;
        if (inj_valid) begin
          seen_valid++;
          chk(t >= 2 && t <= m + 1, "valid outside feed window");
          if (inj_first) begin seen_first++; chk(t == 2, "first not on step 0"); end
        end
        if (drain_en) begin
          drains++;
          chk(ob_we, "drain without write");
          chk(int'(ob_row) == exp_row, "wrong drain row");
          exp_row--;
          chk(t > m + N / 2 + 1, "drain too early");
        end
        @(negedge clk);
        t++;
      end
      start = 0;
      chk(seen_valid == m, "valid count");
      chk(seen_first == 1, "first count");
      chk(drains == N, "drain count");
      chk(last_cycles == 32'(m + N / 2 + 1 + N), "last_cycles");
      @(negedge clk);
      chk(!busy && !done, "not idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
