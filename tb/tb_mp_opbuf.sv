// Testbench of mp_opbuf: fills a 64 x 32-bit buffer with random words, then
// reads every address back in random order, checking the one-clock read
// latency; writes during reads must land without disturbing the read port.
module tb_mp_opbuf;
  localparam int DEPTH = 64, WIDTH = 32;
  logic clk = 0;
  logic we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mp_opbuf #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    @(posedge clk);
    while (cyc < 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] a;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      a = 6'($urandom);
      raddr = a;
      we = ($urandom_range(0, 3) == 0);
      waddr = 6'($urandom);
      if (waddr == a) waddr = a + 1;
      wdata = $urandom;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h exp %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
