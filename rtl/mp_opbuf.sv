// Operand buffer at the array boundary: one instance per row holds that row's
// ifmap words (IBUF), one instance per column holds that column's weight words
// (WBUF).
//
// A simple one-write, one-read memory: the host side writes a word with we /
// waddr / wdata, the operand control reads the word for MAC step m with raddr
// and gets it on rdata one clock later (synchronous read, as an SRAM macro
// would). Word m of every IBUF and WBUF belongs to the same step of the
// reduction dimension. The paper places IBUFs and WBUFs at the array edges
// and says which operands they distribute; their organisation, depth and port
// timing are this design's choice.
module mp_opbuf #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4608,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
