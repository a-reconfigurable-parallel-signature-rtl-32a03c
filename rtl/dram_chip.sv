// dram_chip: a testable DRAM chip with an on-chip parallel signature
// analyzer that doubles as the word-line parity checker.
//
// The chip holds ROWS x COLS data cells and one parity cell per word line
// (bit line COLS). Every access first selects a whole word line into the
// row latch (dram_array rdata); the analyzer sits on those bit lines.
//
// Normal mode (test=0), one access per req while ready:
//   OP_READ  dout = cell (row,col); scan_out = XOR of the whole word line
//            including its parity cell, 1 when the row holds an error.
//   OP_WRITE the cell is read into the data-out buffer and the parity cell
//            into the parity buffer; parity_update toggles the parity on a
//            transition write; the row is restored with the new cell and
//            parity. scan_out and dout are also valid (the pre-write row).
//   OP_FIX   the cell is overwritten, the parity cell is kept. Used to
//            complement a cell that a soft error has flipped.
// Test mode (test=1), req is one analyzer step, chosen by mode/psa_wr:
//   scan      shift scan_in into the analyzer (row/col ignored);
//   signature read word line `row` and compress it into the signature;
//   write     write the analyzer's contents into word line `row`, parity
//             column included.
// In test mode scan_out is the analyzer's quotient bit (last stage).
//
// Timing: req is taken when ready=1 (edge 0, word line selected); the next
// cycle is the column/restore cycle, with done=1 and dout/scan_out valid;
// ready returns the cycle after. Every operation thus takes two cycles. A
// write without parity upkeep would need no read and could finish in one;
// the read before the write is the cost of the scheme. test, mode and psa_wr
// are chip pins and must be held stable while an operation is in flight.
//
// Follows the document: the parity column, read-before-write parity toggle,
// the analyzer's modes and its reuse as the parity checker on the scan-out
// pin. Own choices: the command encoding, the two-cycle timing, OP_FIX,
// and the reset of the analyzer.
module dram_chip
  import psa_ecc_pkg::*;
#(
  parameter int unsigned ROWS        = 256,
  parameter int unsigned COLS        = 256,
  parameter logic [COLS:0] TAPS      = 1,
  parameter bit          PARITY_TREE = 1'b1,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // test pins
  input  logic          test,
  input  logic          mode,
  input  logic          psa_wr,
  input  logic          scan_in,
  output logic          scan_out,
  // access
  input  logic          req,
  input  chip_op_e      op,
  input  logic [RW-1:0] row,
  input  logic [CW-1:0] col,
  input  logic          din,
  output logic          ready,
  output logic          done,
  output logic          dout
);
  localparam int unsigned M  = COLS + 1;
  localparam int unsigned MW = $clog2(M);

  typedef enum logic {S_IDLE, S_ACC} state_e;
  state_e state;

  chip_op_e      op_q;
  logic [RW-1:0] row_q;
  logic [CW-1:0] col_q;
  logic          din_q;
  logic          scan_q;

  logic          arr_re, arr_we;
  logic [RW-1:0] arr_addr;
  logic [M-1:0]  arr_wdata, row_bits;

  logic          psa_step;
  logic [M-1:0]  psa_bl_out;
  logic          psa_bl_drive;

  logic          dout_buf, par_buf, par_new;
  logic [MW-1:0] cidx;

  assign ready = (state == S_IDLE);
  assign done  = (state == S_ACC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_q   <= OP_READ;
      row_q  <= '0;
      col_q  <= '0;
      din_q  <= 1'b0;
      scan_q <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (req) begin
          state  <= S_ACC;
          op_q   <= op;
          row_q  <= row;
          col_q  <= col;
          din_q  <= din;
          scan_q <= scan_in;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Word-line select on acceptance, restore in the access cycle.
  assign arr_re   = ready && req;
  assign arr_addr = ready ? row : row_q;

  // Data-out and parity buffers, taken from the selected word line.
  assign cidx     = MW'(col_q);
  assign dout_buf = row_bits[cidx];
  assign par_buf  = row_bits[M-1];
  assign dout     = dout_buf;

  parity_update u_parity_update (
    .din        (din_q),
    .dout_buf   (dout_buf),
    .par_buf    (par_buf),
    .transition (),
    .par_new    (par_new)
  );

  always_comb begin
    arr_we    = 1'b0;
    arr_wdata = row_bits;
    psa_step  = 1'b0;
    if (state == S_ACC) begin
      if (test) begin
        psa_step = 1'b1;
        if (psa_bl_drive) begin
          arr_we    = 1'b1;
          arr_wdata = psa_bl_out;
        end
      end else if (op_q == OP_WRITE) begin
        arr_we              = 1'b1;
        arr_wdata[cidx]    = din_q;
        arr_wdata[M-1]      = par_new;
      end else if (op_q == OP_FIX) begin
        arr_we              = 1'b1;
        arr_wdata[cidx]    = din_q;
      end
    end
  end

  dram_array #(.ROWS(ROWS), .M(M)) u_array (
    .clk   (clk),
    .re    (arr_re),
    .we    (arr_we),
    .addr  (arr_addr),
    .wdata (arr_wdata),
    .rdata (row_bits)
  );

  psa #(.M(M), .TAPS(TAPS), .PARITY_TREE(PARITY_TREE)) u_psa (
    .clk      (clk),
    .rst_n    (rst_n),
    .test     (test),
    .mode     (mode),
    .wr       (psa_wr),
    .step     (psa_step),
    .scan_in  (scan_q),
    .bl_in    (row_bits),
    .bl_out   (psa_bl_out),
    .bl_drive (psa_bl_drive),
    .scan_out (scan_out),
    .sig      ()
  );

  // Test pins may not change while an operation is in flight.
  a_pins_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_ACC) |-> ($stable(test) && $stable(mode) && $stable(psa_wr)));

endmodule
