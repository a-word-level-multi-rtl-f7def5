// Testbench of mp_selprec: random X and W words are split into nibbles, the
// eight word psums are formed the way the PE's words form them, and the lanes
// of the selective-precision tree are compared with the element-level
// reference products of mp_tb_pkg for all seven supported ifmap/weight
// precision pairs. Unused lanes must be zero.
module tb_mp_selprec;
  import mp_pkg::*;
  import mp_tb_pkg::*;

  mode_t                    mode;
  logic signed [15:0]       psum [8];
  logic signed [PROD_W-1:0] lane [LANES];
  int checks = 0, failures = 0;

  mp_selprec dut (.mode, .psum, .lane);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint nib(logic [3:0] v, bit top);
    return top ? s4(v) : longint'(v);
  endfunction

  initial begin
    logic [15:0] x;
    logic [31:0] w;
    longint xs [4], wa [4], wb [4], p0, p1;
    bit xtop, wtop;
    for (int m = 0; m < 7; m++) begin
      mode = MODES[m];
      for (int i = 0; i < 3000; i++) begin
        x = 16'($urandom);
        w = $urandom;
        if (i == 0) begin x = 16'h8000; w = 32'h8888_8000; end
        if (i == 1) begin x = 16'h8080; w = 32'h8888_8080; end
        for (int n = 0; n < 4; n++) begin
          xtop = (mode.x == PREC4) || (n == 3) || (mode.x == PREC8 && n == 1);
          wtop = (mode.w == PREC4) || (n == 3) || (mode.w == PREC8 && n == 1);
          xs[n] = nib(x[4*n +: 4], xtop);
          wa[n] = nib(w[4*n +: 4], wtop);
          wb[n] = (mode.x == PREC4) ? s4(w[16+4*n +: 4]) : wa[n];
        end
        for (int k = 0; k < 4; k++) begin
          for (int r = 0; r < 2; r++) begin
            p0 = wa[k] * xs[2*r];
            p1 = wb[k] * xs[2*r+1];
            psum[k + 4*r] = 16'((mode.x == PREC4) ? p0 + p1 : p0 + 16 * p1);
          end
        end
        #1;
        for (int j = 0; j < LANES; j++) begin
          checks++;
          if (longint'(lane[j]) != lane_ref(mode, x, w, j)) begin
            failures++;
            if (failures < 10) $display("mode %0d x=%h w=%h lane %0d got %0d exp %0d",
                                        m, x, w, j, lane[j], lane_ref(mode, x, w, j));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
