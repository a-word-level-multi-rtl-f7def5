// Operand and precision control of the systolic array for one output tile.
//
// On start it latches the precision pair (broadcast to every PE for the whole
// tile) and the reduction length m_len, then runs four phases:
//   FEED  m_len cycles: reads word m = 0..m_len-1 of every IBUF and WBUF.
//         One clock later (buffer latency) the words are on the diagonal
//         injection buses with inj_valid, and inj_first marks step 0.
//   WAVE  HOPS+1 cycles: the last operands travel the ring to the PEs farthest
//         from the diagonal (HOPS = N/2) and are accumulated.
//   DRAIN N cycles: drain_en shifts the accumulators down the columns; ob_we
//         and ob_row write the bottom row into the output buffers, row N-1
//         first.
//   then done pulses for one clock and the control is idle again.
// A tile therefore takes m_len + N/2 + N + 1 cycles, reported on last_cycles.
// The paper names separate ifmap, weight and precision controls and gives the
// runtime model T = R + M + ceil(max(R,C)/2) - 1 per tile; this control
// matches that model up to one cycle of buffer latency (and one more hop for
// even N). The phase sequencing, the handshake (start accepted only when idle)
// and the port timing are this design's choice.
module mp_ctrl
  import mp_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned DEPTH = 4608,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned HOPS = N / 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW:0]       m_len,      // 1..DEPTH MAC steps in this tile
  input  mode_t             mode_in,
  output mode_t             mode,
  output logic [AW-1:0]     rd_addr,
  output logic              inj_valid,
  output logic              inj_first,
  output logic              drain_en,
  output logic              ob_we,
  output logic [RW-1:0]     ob_row,
  output logic              busy,
  output logic              done,
  output logic [31:0]       last_cycles
);

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_WAVE, S_DRAIN} state_t;

  state_t      state;
  logic [AW:0] m_q;
  logic [AW:0] step;
  logic [31:0] cnt;
  logic [31:0] cyc;
  logic        iss_valid, iss_first;

  assign iss_valid = (state == S_FEED);
  assign iss_first = (state == S_FEED) && (step == 0);
  assign rd_addr   = step[AW-1:0];
  assign drain_en  = (state == S_DRAIN);
  assign ob_we     = drain_en;
  assign ob_row    = RW'(N - 1 - cnt);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      m_q         <= '0;
      step        <= '0;
      cnt         <= '0;
      cyc         <= '0;
      mode        <= '{x: PREC16, w: PREC16};
      inj_valid   <= 1'b0;
      inj_first   <= 1'b0;
      done        <= 1'b0;
      last_cycles <= '0;
    end else begin
      inj_valid <= iss_valid;
      inj_first <= iss_first;
      done      <= 1'b0;
      if (state != S_IDLE) cyc <= cyc + 1;
      case (state)
        S_IDLE: if (start) begin
          state <= S_FEED;
          m_q   <= m_len;
          mode  <= mode_in;
          step  <= '0;
          cyc   <= '0;
        end
        S_FEED: begin
          step <= step + 1;
          if (step + 1 == m_q) begin
            state <= S_WAVE;
            cnt   <= '0;
          end
        end
        S_WAVE: begin
          cnt <= cnt + 1;
          if (cnt == HOPS) begin
            state <= S_DRAIN;
            cnt   <= '0;
          end
        end
        S_DRAIN: begin
          cnt <= cnt + 1;
          if (cnt == N - 1) begin
            state       <= S_IDLE;
            done        <= 1'b1;
            last_cycles <= cyc + 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A tile needs at least one and at most DEPTH reduction steps.
  always_ff @(posedge clk)
    if (rst_n && state == S_IDLE && start)
      assert (m_len != 0 && 32'(m_len) <= DEPTH)
        else $error("mp_ctrl: m_len %0d outside 1..%0d", m_len, DEPTH);

  // Supported precision pairs: 4-bit ifmaps only with 4-bit weights.
  always_ff @(posedge clk)
    if (rst_n && state == S_IDLE && start)
      assert (mode_in.x != 2'd3 && mode_in.w != 2'd3 &&
              (mode_in.x != PREC4 || mode_in.w == PREC4))
        else $error("mp_ctrl: unsupported precision pair");

endmodule
