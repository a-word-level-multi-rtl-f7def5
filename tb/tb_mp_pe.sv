// Testbench of mp_pe. Two PEs: a diagonal PE that takes operands from the
// injection buses, and a non-diagonal PE that takes them one hop later from
// its west-travelling X and south-travelling W ring inputs. Random tiles in
// every supported precision pair with random reduction lengths are accumulated and
// compared with the element-level reference; the non-diagonal PE must lag by
// exactly one clock. Then one drain step must move the diagonal PE's result
// into the second PE (acc_in -> acc) and clear the first. Tiles follow each
// other without reset, so the first-step restart of the accumulators is
// exercised too.
module tb_mp_pe;
  import mp_pkg::*;
  import mp_tb_pkg::*;

  localparam int ACC_W = 40;
  logic clk = 0, rst_n = 0;
  mode_t mode = '{x: PREC16, w: PREC16};
  logic [XW-1:0] inj_x = '0;
  tok_t          inj_tok = '0;
  logic [WW-1:0] inj_w = '0;
  logic          drain_en = 0;
  logic signed [ACC_W-1:0] zero [LANES];
  logic signed [ACC_W-1:0] acc_a [LANES], acc_b [LANES];
  logic [XW-1:0] xe_a, xw_a, xe_b, xw_b;
  tok_t          te_a, tw_a, te_b, tw_b;
  logic [WW-1:0] ws_a, wn_a, ws_b, wn_b;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial for (int j = 0; j < LANES; j++) zero[j] = '0;

  mp_pe #(.ACC_W(ACC_W), .IS_DIAG(1'b1)) u_a (
    .clk, .rst_n, .mode, .inj_x, .inj_tok, .inj_w,
    .xe_in('0), .te_in('0), .xe_out(xe_a), .te_out(te_a),
    .xw_in('0), .tw_in('0), .xw_out(xw_a), .tw_out(tw_a),
    .ws_in('0), .ws_out(ws_a), .wn_in('0), .wn_out(wn_a),
    .drain_en, .acc_in(zero), .acc_out(acc_a));

  mp_pe #(.ACC_W(ACC_W), .IS_DIAG(1'b0), .X_FROM_WEST(1'b0), .W_FROM_SOUTH(1'b0)) u_b (
    .clk, .rst_n, .mode, .inj_x('1), .inj_tok('0), .inj_w('1),
    .xe_in(16'h5a5a), .te_in('0), .xe_out(xe_b), .te_out(te_b),
    .xw_in(xw_a), .tw_in(tw_a), .xw_out(xw_b), .tw_out(tw_b),
    .ws_in(ws_a), .ws_out(ws_b), .wn_in('1), .wn_out(wn_b),
    .drain_en, .acc_in(acc_a), .acc_out(acc_b));

  initial begin
    @(posedge clk);
    while (cyc < 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_acc(string tag, const ref logic signed [ACC_W-1:0] got [LANES],
                           input longint exp [LANES]);
    for (int j = 0; j < LANES; j++) begin
      checks++;
      if (longint'(got[j]) != exp[j]) begin
        failures++;
        if (failures < 10) $display("%s lane %0d got %0d exp %0d", tag, j, got[j], exp[j]);
      end
    end
  endtask

  initial begin
    longint exp [LANES], zexp [LANES];
    int m_len;
    for (int j = 0; j < LANES; j++) zexp[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      mode  = MODES[t % 7];
      m_len = (t < 7) ? 1 : $urandom_range(1, 24);
      for (int j = 0; j < LANES; j++) exp[j] = 0;
      for (int s = 0; s < m_len; s++) begin
        @(negedge clk);
        inj_x   = 16'($urandom);
        inj_w   = rand_w(mode.w);
        inj_tok = '{valid: 1'b1, first: (s == 0)};
        for (int j = 0; j < LANES; j++) exp[j] += lane_ref(mode, inj_x, inj_w, j);
      end
      @(negedge clk);
      inj_tok = '0;
      inj_x   = 16'($urandom);
      // diagonal PE has finished, the neighbour one hop away is one step behind
      check_acc("diag", acc_a, exp);
      checks++;
      if (tw_b.valid !== 1'b1) begin
        failures++;
        $display("neighbour did not see the last step one clock later");
      end
      @(negedge clk);
      check_acc("hop1", acc_b, exp);
      // one drain step: result moves one PE down, the top PE takes acc_in
      drain_en = 1;
      @(negedge clk);
      drain_en = 0;
      check_acc("drain-b", acc_b, exp);
      check_acc("drain-a", acc_a, zexp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
