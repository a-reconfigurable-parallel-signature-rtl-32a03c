// parity_update: row-parity maintenance for a DRAM write.
//
// Before a write the selected cell is read into the data-out buffer and the
// row's parity cell into the parity buffer. The new data (data-in buffer) is
// XORed with the data-out buffer: a 1 marks a transition write, one that
// changes the cell, and the parity bit is then complemented. A write that
// leaves the cell unchanged leaves the parity unchanged, so the XOR of a word
// line and its parity cell stays 0 from the all-zero initial state.
//
// Purely combinational; the chip that uses it takes one extra read per write.
// Follows the document exactly.
module parity_update (
  input  logic din,         // data-in buffer
  input  logic dout_buf,    // data-out buffer: current cell value
  input  logic par_buf,     // parity buffer: current row parity
  output logic transition,  // write changes the cell
  output logic par_new      // parity to store with the write
);
  assign transition = din ^ dout_buf;
  assign par_new    = par_buf ^ transition;
endmodule
