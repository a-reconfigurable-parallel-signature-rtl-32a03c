// tb_dram_chip: one chip of 4 word lines x 8 cells (+ parity cell), with
// the cascade parity and a two-tap feedback polynomial, against a model of
// its cells and analyzer. Clears the chip through analyzer write mode, then
// runs random reads (cell and word-line check), parity-maintaining writes
// (parity flips only on a transition), restores that leave the parity
// (planting upsets the check must then flag) and analyzer scan, signature
// and write steps. Every operation must take the two-cycle timing.
module tb_dram_chip;
  import psa_ecc_pkg::*;
  localparam int ROWS = 4, COLS = 8, M = COLS + 1;
  localparam logic [M-1:0] TAPS = 9'b0_0001_0001;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       test = 1'b0, mode = 1'b0, psa_wr = 1'b0, scan_in = 1'b0;
  logic       req = 1'b0, din = 1'b0;
  chip_op_e   op = OP_READ;
  logic [1:0] row = '0;
  logic [2:0] col = '0;
  logic       scan_out, ready, done, dout;

  dram_chip #(.ROWS(ROWS), .COLS(COLS), .TAPS(TAPS), .PARITY_TREE(1'b0)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_trans = 0, n_silent = 0, n_flag = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t: %s", $time, msg); end
  endtask

  logic [M-1:0] mem_m [ROWS];
  logic [M-1:0] psa_m = '0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation, called at a falling edge with the chip ready.
  task automatic do_op(bit t, bit md, bit w, chip_op_e o, int r, int c, bit d, bit si);
    logic [M-1:0] nx;
    logic q;
    check(ready, "ready before an operation");
    test = t; mode = md; psa_wr = w; op = o; row = 2'(r); col = 3'(c); din = d;
    scan_in = si; req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    check(done && !ready, "done one cycle after acceptance");
    if (t) begin
      check(scan_out == psa_m[M-1], "quotient on scan-out");
      q = psa_m[M-1];
      if (md) begin
        nx[0] = mem_m[r][0] ^ (TAPS[0] & q);
        for (int j = 1; j < M; j++) nx[j] = mem_m[r][j] ^ psa_m[j-1] ^ (TAPS[j] & q);
        psa_m = nx;
      end else if (w) begin
        mem_m[r] = psa_m;
      end else begin
        psa_m = {psa_m[M-2:0], si};
      end
    end else begin
      check(dout == mem_m[r][c], $sformatf("cell (%0d,%0d)", r, c));
      check(scan_out == ^mem_m[r], $sformatf("word-line check of row %0d", r));
      if (scan_out) n_flag++;
      if (o == OP_WRITE) begin
        if (mem_m[r][c] != d) begin mem_m[r][M-1] ^= 1'b1; n_trans++; end
        else n_silent++;
        mem_m[r][c] = d;
      end else if (o == OP_FIX) begin
        mem_m[r][c] = d;
      end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) do_op(1'b1, 1'b0, 1'b1, OP_READ, r, 0, 1'b0, 1'b0);
    for (int r = 0; r < ROWS; r++) do_op(1'b0, 1'b0, 1'b0, OP_READ, r, r, 1'b0, 1'b0);
    for (int k = 0; k < 600; k++) begin
      int r = $urandom_range(ROWS - 1);
      int c = $urandom_range(COLS - 1);
      bit d = 1'($urandom);
      case ($urandom_range(9))
        0, 1, 2: do_op(1'b0, 1'b0, 1'b0, OP_READ,  r, c, d, 1'b0);
        3, 4, 5: do_op(1'b0, 1'b0, 1'b0, OP_WRITE, r, c, d, 1'b0);
        6:       do_op(1'b0, 1'b0, 1'b0, OP_FIX,   r, c, d, 1'b0);
        7:       do_op(1'b1, 1'b0, 1'b0, OP_READ,  r, c, d, 1'($urandom));
        8:       do_op(1'b1, 1'b1, 1'b0, OP_READ,  r, c, d, 1'b0);
        default: do_op(1'b1, 1'b0, 1'b1, OP_READ,  r, c, d, 1'b0);
      endcase
    end
    check(n_trans > 0 && n_silent > 0 && n_flag > 0, "transition, silent writes and flagged rows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
