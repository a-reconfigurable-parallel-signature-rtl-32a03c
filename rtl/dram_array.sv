// dram_array: the cell array of one DRAM chip, ROWS word lines of M cells.
//
// A word line is read or restored as a whole, as in a DRAM, where selecting
// a word line puts every cell of the row on its bit line. The last cell of
// each row (bit M-1) is the row-parity cell. Read: with re=1 the row at
// addr appears on rdata (the sense-amplifier latch) after the clock edge and
// stays there until the next read. Write: with we=1 wdata is stored into the
// row at addr on the clock edge. The cells are not reset; they are cleared
// by writing every row.
//
// Follows the document: sqrt(n) x sqrt(n) data cells plus one parity cell per
// word line. Own choices: single-port synchronous whole-row access.
module dram_array #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned M    = 257,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          re,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [M-1:0]  wdata,
  output logic [M-1:0]  rdata
);
  logic [M-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
