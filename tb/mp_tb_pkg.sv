// Reference arithmetic for the testbenches of the multi-precision systolic
// array, written at element level (whole 16/8/4-bit two's-complement values),
// independently of the nibble decomposition inside the PE.
//
// Operand packing: X is 16 bits. 16-bit: one value. 8-bit: Xa = X[7:0],
// Xb = X[15:8]. 4-bit: x_i = X[4i+3:4i]. W is 32 bits. 16-bit: one value
// W[15:0]. 8-bit: W0 = W[7:0], W1 = W[15:8]. 4-bit: w_k = W[4k+3:4k]; with
// 4-bit ifmaps filter k also uses v_k = W[16+4k+3:16+4k] for the second
// channel.
package mp_tb_pkg;
  import mp_pkg::*;

  function automatic longint s16(logic [15:0] v); return longint'(signed'(v)); endfunction
  function automatic longint s8 (logic [7:0]  v); return longint'(signed'(v)); endfunction
  function automatic longint s4 (logic [3:0]  v); return longint'(signed'(v)); endfunction

  // The supported ifmap/weight precision pairs.
  localparam mode_t MODES [7] = '{
    '{x: PREC16, w: PREC16}, '{x: PREC8, w: PREC8}, '{x: PREC4, w: PREC4},
    '{x: PREC16, w: PREC8},  '{x: PREC16, w: PREC4},
    '{x: PREC8,  w: PREC16}, '{x: PREC8,  w: PREC4}};

  function automatic mode_t same(prec_t p);
    return '{x: p, w: p};
  endfunction

  // Expected product of one MAC step on lane j. Lanes enumerate
  // (ifmap element, weight element) pairs, ifmap element major; ifmap
  // elements are Xa then Xb, weight elements are taken from the most
  // significant one down (W1, W0 or w3..w0).
  function automatic longint lane_ref(mode_t md, logic [15:0] x, logic [31:0] w, int j);
    longint xe [2], we [4];
    int nx, nw, k;
    if (md.x == PREC4) begin
      k = 3 - (j % 4);
      if (j < 4) return s4(w[4*k +: 4]) * s4(x[3:0])  + s4(w[16+4*k +: 4]) * s4(x[7:4]);
      else       return s4(w[4*k +: 4]) * s4(x[11:8]) + s4(w[16+4*k +: 4]) * s4(x[15:12]);
    end
    if (md.x == PREC16) begin nx = 1; xe[0] = s16(x); end
    else begin nx = 2; xe[0] = s8(x[7:0]); xe[1] = s8(x[15:8]); end
    case (md.w)
      PREC16: begin nw = 1; we[0] = s16(w[15:0]); end
      PREC8:  begin nw = 2; we[0] = s8(w[15:8]); we[1] = s8(w[7:0]); end
      default: begin
        nw = 4;
        for (int i = 0; i < 4; i++) we[i] = s4(w[4*(3-i) +: 4]);
      end
    endcase
    if (j >= nx * nw) return 0;
    return xe[j / nw] * we[j % nw];
  endfunction

  function automatic logic [31:0] rand_w(prec_t p);
    logic [31:0] w = $urandom;
    return w;
  endfunction

endpackage
