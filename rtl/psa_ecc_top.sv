// psa_ecc_top: two-level parity memory system with PSA-based on-chip
// error detection, plus the ganged-CMOS example circuits beside it.
//
// Memory system: W data DRAM chips (chip i holds bit i of every word) and
// one level-2 parity chip (chip W) holding the XOR of each word. Each chip
// is ROWS x COLS cells plus one parity cell per word line and carries a
// parallel signature analyzer which, outside test mode, checks the parity
// of the whole selected word line and reports it on the chip's scan-out
// pin. The ecc_controller initialises the memory, writes words with their
// level-2 parity, and on a read combines the W+1 bits with the W+1 scan-out
// flags to correct a single-bit error, restore the faulty cell, and scrub
// word lines that hold latent upsets. A word is addressed by (row, col),
// the same row and column in every chip.
//
// Host port: h_req/h_we/h_row/h_col/h_wdata, taken when h_ready=1; a read
// answers one cycle later with h_rvalid, h_rdata (corrected), h_status, the
// level-2 check h_l2_err and the per-chip word-line flags h_row_err.
// init_done rises 2*ROWS cycles after reset.
// Test port: with t_test=1, each t_req steps every chip's analyzer in the
// mode given by t_mode/t_wr on word line t_row; t_scan_in/t_scan_out are
// the chips' scan-in and scan-out pins, t_done marks the step's end.
// Events ev_fix and ev_scrub_start pulse when a cell is restored and when a
// word-line scrub begins.
//
// Ganged-CMOS part, unconnected to the memory: three gcmos_gate instances
// sized as OR, AND and A.B+C of (g_a, g_b, g_c), and a glad_adder full adder.
//
// Defaults: W=16 data bits and 256 x 256 cells per chip (n = 64K words);
// the scheme is defined for any w and n, and these sizes are this design's
// choice.
module psa_ecc_top
  import psa_ecc_pkg::*;
#(
  parameter int unsigned W           = 16,
  parameter int unsigned ROWS        = 256,
  parameter int unsigned COLS        = 256,
  parameter logic [COLS:0] TAPS      = 1,
  parameter bit          PARITY_TREE = 1'b1,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
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
  output logic          h_l2_err,
  output logic [W:0]    h_row_err,
  output logic          init_done,
  // test port
  input  logic          t_test,
  input  logic          t_mode,
  input  logic          t_wr,
  input  logic          t_req,
  input  logic [RW-1:0] t_row,
  input  logic [W:0]    t_scan_in,
  output logic [W:0]    t_scan_out,
  output logic          t_done,
  // events
  output logic          ev_fix,
  output logic          ev_scrub_start,
  // ganged-CMOS examples
  input  logic          g_a,
  input  logic          g_b,
  input  logic          g_c,
  output logic          g_or,
  output logic          g_and,
  output logic          g_abc,
  input  logic          fa_a,
  input  logic          fa_b,
  input  logic          fa_cin,
  output logic          fa_sum,
  output logic          fa_cout
);

  logic          c_test, c_mode, c_wr;
  logic [W:0]    c_req, c_din, c_scan_in;
  chip_op_e      c_op;
  logic [RW-1:0] c_row;
  logic [CW-1:0] c_col;
  logic [W:0]    c_ready, c_done, c_dout, c_scan_out;

  ecc_controller #(.W(W), .ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .h_req          (h_req),
    .h_we           (h_we),
    .h_row          (h_row),
    .h_col          (h_col),
    .h_wdata        (h_wdata),
    .h_ready        (h_ready),
    .h_rvalid       (h_rvalid),
    .h_rdata        (h_rdata),
    .h_status       (h_status),
    .h_row_err      (h_row_err),
    .h_l2_err       (h_l2_err),
    .init_done      (init_done),
    .t_test         (t_test),
    .t_mode         (t_mode),
    .t_wr           (t_wr),
    .t_req          (t_req),
    .t_row          (t_row),
    .t_scan_in      (t_scan_in),
    .t_done         (t_done),
    .ev_fix         (ev_fix),
    .ev_scrub_start (ev_scrub_start),
    .c_test         (c_test),
    .c_mode         (c_mode),
    .c_wr           (c_wr),
    .c_req          (c_req),
    .c_op           (c_op),
    .c_row          (c_row),
    .c_col          (c_col),
    .c_din          (c_din),
    .c_scan_in      (c_scan_in),
    .c_ready        (c_ready),
    .c_done         (c_done),
    .c_dout         (c_dout),
    .c_scan_out     (c_scan_out)
  );

  // Chips 0..W-1 hold the data bits, chip W the level-2 parity.
  for (genvar i = 0; i <= W; i++) begin : g_chip
    dram_chip #(
      .ROWS(ROWS), .COLS(COLS), .TAPS(TAPS), .PARITY_TREE(PARITY_TREE)
    ) u_chip (
      .clk      (clk),
      .rst_n    (rst_n),
      .test     (c_test),
      .mode     (c_mode),
      .psa_wr   (c_wr),
      .scan_in  (c_scan_in[i]),
      .scan_out (c_scan_out[i]),
      .req      (c_req[i]),
      .op       (c_op),
      .row      (c_row),
      .col      (c_col),
      .din      (c_din[i]),
      .ready    (c_ready[i]),
      .done     (c_done[i]),
      .dout     (c_dout[i])
    );
  end

  assign t_scan_out = c_scan_out;

  // Ganged-CMOS example gates (inputs in[0]=A, in[1]=B, in[2]=C).
  gcmos_gate #(.N(3), .KN('{4, 4, 4, 0}), .KP('{1, 1, 1, 0}), .VSW_PCT(50))
    u_gc_or  (.in({g_c, g_b, g_a}), .out(g_or),  .vg_pct());
  gcmos_gate #(.N(3), .KN('{1, 1, 1, 0}), .KP('{4, 4, 4, 0}), .VSW_PCT(50))
    u_gc_and (.in({g_c, g_b, g_a}), .out(g_and), .vg_pct());
  gcmos_gate #(.N(3), .KN('{1, 1, 2, 0}), .KP('{1, 1, 2, 0}), .VSW_PCT(55))
    u_gc_abc (.in({g_c, g_b, g_a}), .out(g_abc), .vg_pct());

  glad_adder u_glad (
    .a    (fa_a),
    .b    (fa_b),
    .cin  (fa_cin),
    .sum  (fa_sum),
    .cout (fa_cout)
  );

endmodule
