// Output buffer below one column of the array.
//
// During the drain the column's accumulators leave the bottom PE one row per
// clock, bottom row first; the control writes each into entry wr_row. The host
// reads the LANES results of one PE (row rd_row of this column) on rd_data one
// clock after presenting rd_row. Lane meaning depends on the precision mode of
// the tile (see mp_selprec). The paper places the output buffers at the bottom
// of the array; the one-entry-per-row organisation and port timing are this
// design's choice.
module mp_obuf
  import mp_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned ACC_W = 48,
  localparam int unsigned RW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [RW-1:0]            wr_row,
  input  logic signed [ACC_W-1:0]  wr_data [LANES],
  input  logic [RW-1:0]            rd_row,
  output logic signed [ACC_W-1:0]  rd_data [LANES]
);

  logic [LANES*ACC_W-1:0] mem [N];
  logic [LANES*ACC_W-1:0] wr_flat, rd_flat;

  always_comb
    for (int j = 0; j < LANES; j++) wr_flat[j*ACC_W +: ACC_W] = wr_data[j];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_flat;
    rd_flat <= mem[rd_row];
  end

  always_comb
    for (int j = 0; j < LANES; j++) rd_data[j] = rd_flat[j*ACC_W +: ACC_W];

endmodule
