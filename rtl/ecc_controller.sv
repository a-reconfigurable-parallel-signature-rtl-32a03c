// ecc_controller: memory-system controller for W data DRAM chips plus one
// level-2 parity chip (chip index W), all sharing row/column addresses.
//
// After reset it initialises the whole memory to zero: every chip's
// analyzer is cleared by reset and written, in analyzer write mode, into
// each word line in turn, so data and parity cells all start at 0.
// Host write: the level-2 parity of the word (XOR of its W bits) is stored
// in chip W, and every chip does its parity-maintaining OP_WRITE.
// Host read: every chip reads the addressed cell and checks its word line;
// ecc_decoder combines the W+1 bits and W+1 scan-out flags. The corrected
// word and its status are returned. Then
//   - ECC_CORRECTED: the faulty cell is restored (OP_FIX on that chip);
//   - ECC_LATENT / ECC_DOUBLE: the word is good but word lines hold upsets,
//     so the controller locates them by reading every column of that row in
//     all chips (a scrub) and restoring each cell the decoder pins down.
// Test port: while t_test=1 and the controller is idle, t_req steps the
// analyzers of all chips (scan / signature / write per t_mode, t_wr) on
// word line t_row; each chip gets its own scan-in bit, and the scan-out
// pins are visible at the top.
//
// Timing: h_req is taken when h_ready=1. A read returns h_rvalid one cycle
// later with h_rdata/h_status; h_ready then stays low for 2 cycles if a cell
// is restored, or about 2-4 cycles per column while a word line is scrubbed.
// A write occupies the chips 2 cycles. Initialisation takes 2*ROWS cycles.
//
// Follows the document: level-2 parity chip, zero initialisation, the
// decision table, complementing the located cell, and locating upsets on a
// flagged word line by reading it sequentially. Own choices: doing the
// initialisation through the analyzers' write mode, the handshake and the
// state machine, scrubbing in hardware (the document allows hardware or
// software) and restoring cells without touching the row parity.
module ecc_controller
  import psa_ecc_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter int unsigned ROWS = 256,
  parameter int unsigned COLS = 256,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned IW = $clog2(W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host port
  input  logic          h_req,
  input  logic          h_we,
  input  logic [RW-1:0] h_row,
  input  logic [CW-1:0] h_col,
  input  logic [W-1:0]  h_wdata,
  output logic          h_ready,
  output logic          h_rvalid,
  output logic [W-1:0]  h_rdata,
  output ecc_status_e   h_status,
  output logic [W:0]    h_row_err,
  output logic          h_l2_err,
  output logic          init_done,
  // test port
  input  logic          t_test,
  input  logic          t_mode,
  input  logic          t_wr,
  input  logic          t_req,
  input  logic [RW-1:0] t_row,
  input  logic [W:0]    t_scan_in,
  output logic          t_done,
  // events, one-cycle pulses
  output logic          ev_fix,          // a located cell is being restored
  output logic          ev_scrub_start,  // a word-line scrub begins
  // chips
  output logic          c_test,
  output logic          c_mode,
  output logic          c_wr,
  output logic [W:0]    c_req,
  output chip_op_e      c_op,
  output logic [RW-1:0] c_row,
  output logic [CW-1:0] c_col,
  output logic [W:0]    c_din,
  output logic [W:0]    c_scan_in,
  input  logic [W:0]    c_ready,
  input  logic [W:0]    c_done,
  input  logic [W:0]    c_dout,
  input  logic [W:0]    c_scan_out
);

  typedef enum logic [3:0] {
    S_INIT_ISSUE, S_INIT_WAIT, S_IDLE, S_TEST_WAIT, S_WR_WAIT, S_RD_WAIT,
    S_FIX_ISSUE, S_FIX_WAIT, S_SCRUB_ISSUE, S_SCRUB_WAIT
  } state_e;
  state_e state;

  logic [RW-1:0] row_q;
  logic [CW-1:0] col_q;
  logic [IW-1:0] fix_chip_q;
  logic          fix_bit_q;
  logic          scrub_q;
  logic          t_mode_q, t_wr_q;
  logic          all_ready, any_done, last_row, last_col;

  logic [W:0]    corr_bits;
  logic          l2_err;
  ecc_status_e   status;
  logic          fix_en;
  logic [IW-1:0] fix_chip;
  logic [W:0]    row_err;

  ecc_decoder #(.W(W)) u_decoder (
    .rd_bits   (c_dout),
    .l1_err    (c_scan_out),
    .corr_bits (corr_bits),
    .l2_err    (l2_err),
    .status    (status),
    .fix_en    (fix_en),
    .fix_chip  (fix_chip),
    .row_err   (row_err)
  );

  assign all_ready = &c_ready;
  assign any_done  = |c_done;
  assign last_row  = (row_q == RW'(ROWS - 1));
  assign last_col  = (col_q == CW'(COLS - 1));

  // Chip command bus.
  always_comb begin
    c_test    = 1'b0;
    c_mode    = 1'b0;
    c_wr      = 1'b0;
    c_req     = '0;
    c_op      = OP_READ;
    c_row     = row_q;
    c_col     = col_q;
    c_din     = '0;
    c_scan_in = '0;
    unique case (state)
      S_INIT_ISSUE, S_INIT_WAIT: begin
        c_test = 1'b1;
        c_wr   = 1'b1;
        if (state == S_INIT_ISSUE && all_ready) c_req = '1;
      end
      S_IDLE: begin
        if (t_test) begin
          c_test    = 1'b1;
          c_mode    = t_mode;
          c_wr      = t_wr;
          c_row     = t_row;
          c_scan_in = t_scan_in;
          if (t_req && all_ready) c_req = '1;
        end else begin
          c_row = h_row;
          c_col = h_col;
          c_op  = h_we ? OP_WRITE : OP_READ;
          c_din = {^h_wdata, h_wdata};
          if (h_req && all_ready) c_req = '1;
        end
      end
      S_TEST_WAIT: begin
        c_test = 1'b1;
        c_mode = t_mode_q;
        c_wr   = t_wr_q;
      end
      S_FIX_ISSUE: begin
        c_op = OP_FIX;
        c_din[fix_chip_q] = fix_bit_q;
        if (all_ready) c_req[fix_chip_q] = 1'b1;
      end
      S_FIX_WAIT: c_op = OP_FIX;
      S_SCRUB_ISSUE: if (all_ready) c_req = '1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT_ISSUE;
      row_q      <= '0;
      col_q      <= '0;
      fix_chip_q <= '0;
      fix_bit_q  <= 1'b0;
      scrub_q    <= 1'b0;
      t_mode_q   <= 1'b0;
      t_wr_q     <= 1'b0;
      init_done  <= 1'b0;
    end else begin
      unique case (state)
        S_INIT_ISSUE: if (all_ready) state <= S_INIT_WAIT;
        S_INIT_WAIT: if (any_done) begin
          if (last_row) begin
            state     <= S_IDLE;
            row_q     <= '0;
            init_done <= 1'b1;
          end else begin
            state <= S_INIT_ISSUE;
            row_q <= row_q + 1'b1;
          end
        end
        S_IDLE: begin
          if (t_test) begin
            if (t_req && all_ready) begin
              state    <= S_TEST_WAIT;
              t_mode_q <= t_mode;
              t_wr_q   <= t_wr;
            end
          end else if (h_req && all_ready) begin
            state <= h_we ? S_WR_WAIT : S_RD_WAIT;
            row_q <= h_row;
            col_q <= h_col;
          end
        end
        S_TEST_WAIT: if (any_done) state <= S_IDLE;
        S_WR_WAIT:   if (any_done) state <= S_IDLE;
        S_RD_WAIT: if (any_done) begin
          scrub_q <= 1'b0;
          if (fix_en) begin
            state      <= S_FIX_ISSUE;
            fix_chip_q <= fix_chip;
            fix_bit_q  <= corr_bits[fix_chip];
          end else if (status == ECC_LATENT || status == ECC_DOUBLE) begin
            state   <= S_SCRUB_ISSUE;
            scrub_q <= 1'b1;
            col_q   <= '0;
          end else begin
            state <= S_IDLE;
          end
        end
        S_FIX_ISSUE: if (all_ready) state <= S_FIX_WAIT;
        S_FIX_WAIT: if (any_done) begin
          if (scrub_q && !last_col) begin
            state <= S_SCRUB_ISSUE;
            col_q <= col_q + 1'b1;
          end else begin
            state   <= S_IDLE;
            scrub_q <= 1'b0;
          end
        end
        S_SCRUB_ISSUE: if (all_ready) state <= S_SCRUB_WAIT;
        S_SCRUB_WAIT: if (any_done) begin
          if (fix_en) begin
            state      <= S_FIX_ISSUE;
            fix_chip_q <= fix_chip;
            fix_bit_q  <= corr_bits[fix_chip];
          end else if (!last_col) begin
            state <= S_SCRUB_ISSUE;
            col_q <= col_q + 1'b1;
          end else begin
            state   <= S_IDLE;
            scrub_q <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign h_ready        = (state == S_IDLE) && !t_test && all_ready;
  assign h_rvalid       = (state == S_RD_WAIT) && any_done;
  assign h_rdata        = corr_bits[W-1:0];
  assign h_status       = status;
  assign h_row_err      = row_err;
  assign h_l2_err       = l2_err;
  assign t_done         = (state == S_TEST_WAIT) && any_done;
  assign ev_fix         = (state == S_FIX_ISSUE) && all_ready;
  assign ev_scrub_start = (state == S_RD_WAIT) && any_done && !fix_en &&
                          (status == ECC_LATENT || status == ECC_DOUBLE);

  // The chips work in lock step: a broadcast access finishes in all at once.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      (state inside {S_INIT_WAIT, S_TEST_WAIT, S_WR_WAIT, S_RD_WAIT, S_SCRUB_WAIT})
        |-> (c_done == '0 || c_done == '1));

endmodule
