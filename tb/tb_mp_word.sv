// Testbench of mp_word: exhaustive over all 5-bit signed operand values that
// the PE can present (sign- or zero-extended nibbles) for a sample of pairs,
// in every precision mode, compared with plain integer arithmetic.
module tb_mp_word;
  import mp_pkg::*;

  prec_t             prec;
  logic signed [4:0] w_a, w_b, x_lo, x_hi;
  logic signed [15:0] psum;
  int checks = 0, failures = 0;

  mp_word dut (.xprec(prec), .w_a, .w_b, .x_lo, .x_hi, .psum);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int m = 0; m < 3; m++) begin
      prec = prec_t'(m);
      for (int i = 0; i < 4000; i++) begin
        w_a  = 5'($urandom_range(0, 31) - 16);
        w_b  = 5'($urandom_range(0, 31) - 16);
        x_lo = 5'($urandom_range(0, 31) - 16);
        x_hi = 5'($urandom_range(0, 31) - 16);
        #1;
        if (prec == PREC4) exp = int'(w_a) * int'(x_lo) + int'(w_b) * int'(x_hi);
        else               exp = int'(w_a) * int'(x_lo) + 16 * int'(w_b) * int'(x_hi);
        checks++;
        if (int'(psum) != exp) begin
          failures++;
          if (failures < 10) $display("mode %0d: %0d*%0d,%0d*%0d got %0d exp %0d",
                                      m, w_a, x_lo, w_b, x_hi, psum, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
