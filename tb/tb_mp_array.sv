// Testbench of mp_array: an odd (5 x 5, the size of the paper's dataflow
// example) and an even (6 x 6) ring-based diagonal array, each driven by
// mp_array_tester with random tiles in all precision modes. Both testers wait
// only N/2 clocks after the last injected step before draining, which checks
// that every PE is reached within N/2 hops of the diagonal.
module tb_mp_array;
  logic clk = 0, rst_n = 0;
  int c5, f5, c6, f6, cyc = 0;
  logic d5, d6;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mp_array_tester #(.N(5), .TILES(24)) u5 (.clk, .rst_n, .checks(c5), .failures(f5), .finished(d5));
  mp_array_tester #(.N(6), .TILES(24)) u6 (.clk, .rst_n, .checks(c6), .failures(f6), .finished(d6));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    @(posedge clk);
    while (cyc < 5000 && !(d5 && d6)) @(posedge clk);
    if (!(d5 && d6)) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c5 + c6, f5 + f6 + 1);
    end else begin
      $display("TB_RESULT checks=%0d failures=%0d", c5 + c6, f5 + f6);
    end
    $finish;
  end
endmodule
