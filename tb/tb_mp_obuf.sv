// Testbench of mp_obuf: writes N rows of random lane results in drain order
// (row N-1 first, one per clock), then reads every row back and checks all
// lanes and the one-clock read latency.
module tb_mp_obuf;
  import mp_pkg::*;
  localparam int N = 16, ACC_W = 40;
  logic clk = 0, wr_en = 0;
  logic [3:0] wr_row = '0, rd_row = '0;
  logic signed [ACC_W-1:0] wr_data [LANES], rd_data [LANES];
  logic signed [ACC_W-1:0] model [N][LANES];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mp_obuf #(.N(N), .ACC_W(ACC_W)) dut (.clk, .wr_en, .wr_row, .wr_data, .rd_row, .rd_data);

  initial begin
    @(posedge clk);
    while (cyc < 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 4'(N - 1 - k);
        for (int j = 0; j < LANES; j++) begin
          wr_data[j] = ACC_W'({$urandom, $urandom});
          model[N-1-k][j] = wr_data[j];
        end
      end
      @(negedge clk);
      wr_en = 0;
      for (int r = 0; r < N; r++) begin
        rd_row = 4'(r);
        @(posedge clk); #1;
        for (int j = 0; j < LANES; j++) begin
          checks++;
          if (rd_data[j] !== model[r][j]) begin
            failures++;
            if (failures < 10) $display("row %0d lane %0d got %h exp %h", r, j, rd_data[j], model[r][j]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
