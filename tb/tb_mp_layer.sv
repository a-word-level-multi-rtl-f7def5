// Layer workload testbench at full size (mp_top defaults: 16 x 16 PEs,
// 4608-word buffers). Runs one output tile of the longest reduction found in
// each evaluated network, with random operands in that layer's precision:
//   ResNet-18 3x3x512 convolution      reduction 4608, 16-bit, 4608 steps
//   DQN fully connected 3136 -> 512    reduction 3136,  8-bit, 3136 steps
//   MobileNetV1 pointwise 1024 -> 1024 reduction 1024,  8-bit, 1024 steps
//   SAC hidden layer 256 -> 256        reduction  256,  4-bit,  128 steps
//   MobileNetV1 3x3 depthwise          reduction    9,  4-bit,    5 steps
// (in 4-bit mode each step carries two reduction indices). Every lane of all
// 256 PEs is compared with the element-level reference and each tile's cycle
// count with steps + N/2 + 1 + N.
module tb_mp_layer;
  import mp_pkg::*;
  import mp_tb_pkg::*;

  localparam int N = 16, DEPTH = 4608, ACC_W = 48;
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
    while (cyc < 2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] xs [N][DEPTH];
  logic [31:0] wv [N][DEPTH];
  longint exp [N][N][LANES];

  task automatic run_layer(string name, prec_t p, int k);
    int steps;
    steps = (p == PREC4) ? (k + 1) / 2 : k;
    for (int i = 0; i < N; i++)
      for (int s = 0; s < steps; s++) begin
        xs[i][s] = 16'($urandom);
        wv[i][s] = rand_w(p);
        // odd reduction length in 4-bit mode: the last step's second index is zero
        if (p == PREC4 && (k % 2) == 1 && s == steps - 1) begin
          xs[i][s][7:4] = '0; xs[i][s][15:12] = '0;
        end
        @(negedge clk);
        ib_we = 1; ib_row = 4'(i); ib_addr = 13'(s); ib_wdata = xs[i][s];
        wb_we = 1; wb_col = 4'(i); wb_addr = 13'(s); wb_wdata = wv[i][s];
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        for (int j = 0; j < LANES; j++) begin
          exp[r][c][j] = 0;
          for (int s = 0; s < steps; s++) exp[r][c][j] += lane_ref(same(p), xs[r][s], wv[c][s], j);
        end
    @(negedge clk);
    ib_we = 0; wb_we = 0;
    start = 1; m_len = 14'(steps); mode_in = same(p);
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (last_cycles != 32'(steps + N / 2 + 1 + N)) begin
      failures++;
      $display("%s: %0d cycles, expected %0d", name, last_cycles, steps + N / 2 + 1 + N);
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        ob_row = 4'(r); ob_col = 4'(c);
        @(negedge clk);
        for (int j = 0; j < LANES; j++) begin
          checks++;
          if (longint'(ob_rdata[j]) != exp[r][c][j]) begin
            failures++;
            if (failures < 10) $display("%s PE(%0d,%0d) lane %0d got %0d exp %0d",
                                        name, r, c, j, ob_rdata[j], exp[r][c][j]);
          end
        end
      end
    $display("%s: reduction %0d in %0d steps, tile of %0d cycles", name, k, steps, last_cycles);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_layer("ResNet-18 3x3x512 conv, 16-bit", PREC16, 4608);
    run_layer("DQN FC 3136, 8-bit", PREC8, 3136);
    run_layer("MobileNetV1 pointwise 1024, 8-bit", PREC8, 1024);
    run_layer("SAC hidden 256, 4-bit", PREC4, 256);
    run_layer("MobileNetV1 depthwise 3x3, 4-bit", PREC4, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
