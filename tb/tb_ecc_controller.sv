// tb_ecc_controller: the ECC controller driving real DRAM chips at a small
// size (4 data chips + 1 parity chip, 8 x 8 cells, a feedback polynomial
// with two taps). Same sequence as the system test: initialisation time,
// MSCAN through the analyzers with every quotient bit checked, random
// traffic, and planted soft errors covering every decision of the error
// table, with the restore and word-line scrub counted.
module tb_ecc_controller;
  import psa_ecc_pkg::*;
  localparam int W        = 4;
  localparam int ROWS     = 8;
  localparam int COLS     = 8;
  localparam int M        = COLS + 1;
  localparam int RW       = $clog2(ROWS);
  localparam int CW       = $clog2(COLS);
  localparam logic [M-1:0] TAPS = 9'b0_0001_0001;
  localparam int NRAND    = 200;
  localparam int WATCHDOG = 100000;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          h_req = 1'b0, h_we = 1'b0;
  logic [RW-1:0] h_row = '0;
  logic [CW-1:0] h_col = '0;
  logic [W-1:0]  h_wdata = '0;
  logic          h_ready, h_rvalid, h_l2_err, init_done;
  logic [W-1:0]  h_rdata;
  ecc_status_e   h_status;
  logic [W:0]    h_row_err;
  logic          t_test = 1'b0, t_mode = 1'b0, t_wr = 1'b0, t_req = 1'b0;
  logic [RW-1:0] t_row = '0;
  logic [W:0]    t_scan_in = '0;
  logic [W:0]    t_scan_out;
  logic          t_done, ev_fix, ev_scrub_start;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, msg);
    end
  endtask

  // ---------------- reference model ----------------
  logic [W-1:0] data_m [ROWS][COLS];   // words the host stored
  logic [M-1:0] psa_m  [W+1];          // expected analyzer contents per chip

  function automatic logic [M-1:0] clean_row(int i, int r);
    logic [M-1:0] v = '0;
    for (int c = 0; c < COLS; c++) v[c] = (i == W) ? ^data_m[r][c] : data_m[r][c][i];
    v[M-1] = ^v[M-2:0];
    return v;
  endfunction

  // event counters
  int n_fix = 0, n_scrub = 0;
  int n_st [5] = '{0, 0, 0, 0, 0};
  int n_scan = 0, n_sig = 0, n_twr = 0;
  int n_trans_wr = 0, n_silent_wr = 0, n_par_fix = 0;
  int n_colbar = 0, n_chipfault = 0;
  always @(posedge clk) begin
    if (ev_fix) n_fix++;
    if (ev_scrub_start) n_scrub++;
  end

  // ---------------- host port ----------------
  task automatic wait_ready();
    int guard = 0;
    while (!h_ready && guard < 100000) begin
      @(negedge clk);
      guard++;
    end
  endtask

  task automatic host_write(int r, int c, logic [W-1:0] d);
    wait_ready();
    if (d == data_m[r][c]) n_silent_wr++; else n_trans_wr++;
    h_req = 1'b1; h_we = 1'b1; h_row = RW'(r); h_col = CW'(c); h_wdata = d;
    @(negedge clk);
    h_req = 1'b0; h_we = 1'b0;
    data_m[r][c] = d;
  endtask

  task automatic host_read(int r, int c, output logic [W-1:0] d,
                           output ecc_status_e st, output logic [W:0] rerr);
    wait_ready();
    h_req = 1'b1; h_we = 1'b0; h_row = RW'(r); h_col = CW'(c);
    @(negedge clk);
    h_req = 1'b0;
    check(h_rvalid, "read answers one cycle after acceptance");
    d    = h_rdata;
    st   = h_status;
    rerr = h_row_err;
    n_st[int'(st)]++;
  endtask

  task automatic read_expect(int r, int c, ecc_status_e exp_st, string what);
    logic [W-1:0] d;
    ecc_status_e  st;
    logic [W:0]   rerr;
    host_read(r, c, d, st, rerr);
    check(st == exp_st, $sformatf("%s: status %0d expected %0d at (%0d,%0d)",
                                  what, st, exp_st, r, c));
    if (exp_st != ECC_UNCORRECTABLE && exp_st != ECC_DOUBLE)
      check(d == data_m[r][c], $sformatf("%s: data %h expected %h at (%0d,%0d)",
                                         what, d, data_m[r][c], r, c));
  endtask

  // ---------------- test port ----------------
  // Called at a falling edge with the controller idle; returns two cycles
  // later, when the step has taken effect and the controller is idle again.
  task automatic t_step(bit mode, bit wr, int row, logic [W:0] sin);
    t_test = 1'b1; t_mode = mode; t_wr = wr; t_row = RW'(row); t_scan_in = sin;
    t_req = 1'b1;
    @(negedge clk);
    t_req = 1'b0;
    check(t_done, "analyzer step ends one cycle after acceptance");
    @(negedge clk);
  endtask

  task automatic t_begin();
    wait_ready();
    t_test = 1'b1;
    @(negedge clk);
  endtask

  task automatic t_end();
    @(negedge clk);
    t_test = 1'b0;
    @(negedge clk);
  endtask

  // Shift one bit into every analyzer (expected quotient checked first).
  task automatic scan_step(logic [W:0] sin);
    for (int i = 0; i <= W; i++)
      check(t_scan_out[i] == psa_m[i][M-1], $sformatf("quotient of chip %0d", i));
    t_step(1'b0, 1'b0, 0, sin);
    for (int i = 0; i <= W; i++) psa_m[i] = {psa_m[i][M-2:0], sin[i]};
    n_scan++;
  endtask

  // Load analyzer i with pat[i] (stage j gets pat[i][j]).
  task automatic scan_load(logic [M-1:0] pat [W+1]);
    logic [W:0] sin;
    for (int k = M - 1; k >= 0; k--) begin
      for (int i = 0; i <= W; i++) sin[i] = pat[i][k];
      scan_step(sin);
    end
  endtask

  task automatic row_write(int r, logic [M-1:0] pat [W+1]);
    t_step(1'b0, 1'b1, r, '0);
    n_twr++;
  endtask

  task automatic sig_read(int r, logic [M-1:0] rowval [W+1]);
    logic [M-1:0] nx;
    logic q;
    t_step(1'b1, 1'b0, r, '0);
    for (int i = 0; i <= W; i++) begin
      q = psa_m[i][M-1];
      nx[0] = rowval[i][0] ^ (TAPS[0] & q);
      for (int j = 1; j < M; j++) nx[j] = rowval[i][j] ^ psa_m[i][j-1] ^ (TAPS[j] & q);
      psa_m[i] = nx;
    end
    n_sig++;
  endtask

  // Overwrite word line r of every chip with its clean contents XOR flip[i].
  task automatic inject(int r, logic [M-1:0] flip [W+1]);
    logic [M-1:0] pat [W+1];
    for (int i = 0; i <= W; i++) pat[i] = clean_row(i, r) ^ flip[i];
    t_begin();
    scan_load(pat);
    row_write(r, pat);
    t_end();
  endtask

  task automatic no_flips(output logic [M-1:0] flip [W+1]);
    for (int i = 0; i <= W; i++) flip[i] = '0;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin : main
    int init_cycles;
    int fix0, scrub0, ops;
    int ci, cj, r, c;
    logic [M-1:0] flip [W+1];
    logic [M-1:0] rowv [W+1];
    logic [M-1:0] pat  [W+1];

    for (int rr = 0; rr < ROWS; rr++)
      for (int cc = 0; cc < COLS; cc++) data_m[rr][cc] = '0;
    for (int i = 0; i <= W; i++) psa_m[i] = '0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Initialisation: 2 cycles per word line.
    init_cycles = 0;
    while (!init_done) begin
      @(negedge clk);
      init_cycles++;
    end
    check(init_cycles == 2 * ROWS,
          $sformatf("initialisation took %0d cycles, expected %0d", init_cycles, 2 * ROWS));
    read_expect(0, 0, ECC_OK, "after init");
    read_expect(ROWS - 1, COLS - 1, ECC_OK, "after init");

    // ---- MSCAN through the analyzers: write 0s, read, write 1s, read ----
    t_begin();
    ops = 0;
    for (int i = 0; i <= W; i++) pat[i] = '0;
    for (int rr = 0; rr < ROWS; rr++) begin row_write(rr, pat); ops++; end
    for (int rr = 0; rr < ROWS; rr++) begin sig_read(rr, pat); ops++; end
    for (int i = 0; i <= W; i++) pat[i] = '1;
    scan_load(pat);
    for (int rr = 0; rr < ROWS; rr++) begin row_write(rr, pat); ops++; end
    for (int rr = 0; rr < ROWS; rr++) begin sig_read(rr, pat); ops++; end
    // Scan the signature out and compare every quotient bit on the way.
    for (int k = 0; k < M; k++) scan_step('0);
    check(ops == 4 * ROWS, "MSCAN takes 4 row operations per word line");
    // Restore the all-zero state (analyzers now hold zeros).
    for (int i = 0; i <= W; i++) begin
      check(psa_m[i] == '0, "analyzer flushed");
      pat[i] = '0;
    end
    for (int rr = 0; rr < ROWS; rr++) row_write(rr, pat);
    t_end();
    read_expect(1, 1, ECC_OK, "after MSCAN restore");

    // ---- Column Bar through the analyzers: alternating columns, then the
    //      complement, each written to and read from every word line ----
    t_begin();
    ops = 0;
    for (int i = 0; i <= W; i++)
      for (int j = 0; j < M; j++) pat[i][j] = 1'(j % 2);
    scan_load(pat);
    for (int rr = 0; rr < ROWS; rr++) begin row_write(rr, pat); ops++; end
    for (int rr = 0; rr < ROWS; rr++) begin sig_read(rr, pat); ops++; end
    for (int i = 0; i <= W; i++) pat[i] = ~pat[i];
    scan_load(pat);
    for (int rr = 0; rr < ROWS; rr++) begin row_write(rr, pat); ops++; end
    for (int rr = 0; rr < ROWS; rr++) begin sig_read(rr, pat); ops++; end
    for (int k = 0; k < M; k++) scan_step('0);
    check(ops == 4 * ROWS, "Column Bar takes 4 row operations per word line");
    for (int i = 0; i <= W; i++) pat[i] = '0;
    for (int rr = 0; rr < ROWS; rr++) row_write(rr, pat);
    t_end();
    read_expect(2, 3, ECC_OK, "after Column Bar restore");
    n_colbar++;

    // ---- random traffic on a few rows ----
    for (int k = 0; k < NRAND; k++) begin
      r = $urandom_range(ROWS - 1);
      c = $urandom_range(3);
      if ($urandom_range(2) == 0) begin
        if ($urandom_range(3) == 0) host_write(r, c, data_m[r][c]);
        else host_write(r, c, W'($urandom));
      end else begin
        read_expect(r, c, ECC_OK, "random traffic");
      end
    end
    for (int k = 0; k < 8; k++) read_expect(k % ROWS, k % COLS, ECC_OK, "sweep");

    // ---- single upset in the addressed cell: corrected and restored ----
    r = 1; c = 2; ci = $urandom_range(W - 1);
    no_flips(flip); flip[ci][c] = 1'b1;
    inject(r, flip);
    fix0 = n_fix;
    read_expect(r, c, ECC_CORRECTED, "upset in addressed cell");
    wait_ready();
    check(n_fix == fix0 + 1, "one cell restored");
    read_expect(r, c, ECC_OK, "after restore");
    read_expect(r, 0, ECC_OK, "rest of row after restore");

    // ---- upset in the level-2 parity chip ----
    r = 2; c = 1;
    no_flips(flip); flip[W][c] = 1'b1;
    inject(r, flip);
    fix0 = n_fix;
    read_expect(r, c, ECC_CORRECTED, "upset in parity chip");
    wait_ready();
    check(n_fix == fix0 + 1, "parity cell restored");
    n_par_fix++;
    read_expect(r, c, ECC_OK, "parity chip after restore");

    // ---- latent upset elsewhere on the word line: scrubbed ----
    r = 3; c = COLS - 2; ci = $urandom_range(W - 1);
    no_flips(flip); flip[ci][c] = 1'b1;
    inject(r, flip);
    fix0 = n_fix; scrub0 = n_scrub;
    read_expect(r, 0, ECC_LATENT, "latent upset on word line");
    check(h_row_err == (W + 1)'(1) << ci, "word-line flag names the chip");
    wait_ready();
    check(n_scrub == scrub0 + 1, "scrub started");
    check(n_fix == fix0 + 1, "scrub restored the upset cell");
    read_expect(r, c, ECC_OK, "after scrub");
    read_expect(r, 0, ECC_OK, "after scrub");

    // ---- a whole word line of one chip inverted (defective chip or
    //      word-line driver), an odd number of cells: the first word read
    //      is corrected; restoring that one cell leaves an even number
    //      inverted, so later words on the row are still detected
    //      (level-2 check) but no longer located ----
    r = 6; ci = $urandom_range(W);
    no_flips(flip); flip[ci] = '1;
    inject(r, flip);
    read_expect(r, 0, (M % 2 == 1) ? ECC_CORRECTED : ECC_UNCORRECTABLE, "inverted word line");
    wait_ready();
    for (int k = 0; k < 3; k++) begin
      c = 1 + $urandom_range(COLS - 2);
      read_expect(r, c, ECC_UNCORRECTABLE, "inverted word line, after one restore");
      wait_ready();
    end
    n_chipfault++;
    no_flips(flip);
    inject(r, flip);
    read_expect(r, 0, ECC_OK, "after rewrite");

    // ---- two upsets in one word: detected, not corrected ----
    r = 4; c = 3; ci = 0; cj = W - 1;
    no_flips(flip); flip[ci][c] = 1'b1; flip[cj][c] = 1'b1;
    inject(r, flip);
    read_expect(r, c, ECC_DOUBLE, "two upsets in one word");
    check(h_row_err == (((W + 1)'(1) << ci) | ((W + 1)'(1) << cj)), "both chips flagged");
    wait_ready();
    no_flips(flip);
    inject(r, flip);
    read_expect(r, c, ECC_OK, "after rewrite");

    // ---- two upsets on one word line of one chip: uncorrectable ----
    r = 5; ci = 1;
    no_flips(flip); flip[ci][0] = 1'b1; flip[ci][1] = 1'b1;
    inject(r, flip);
    read_expect(r, 0, ECC_UNCORRECTABLE, "double upset on one word line");
    wait_ready();
    no_flips(flip);
    inject(r, flip);
    read_expect(r, 0, ECC_OK, "after rewrite");

    // ---- signature of a word line holding random data ----
    t_begin();
    for (int i = 0; i <= W; i++) rowv[i] = clean_row(i, 0);
    sig_read(0, rowv);
    for (int k = 0; k < M; k++) scan_step('0);
    t_end();

    // ---- every mechanism seen ----
    check(n_st[ECC_OK] > 0, "ok reads");
    check(n_st[ECC_LATENT] > 0, "latent-error reads");
    check(n_st[ECC_DOUBLE] > 0, "double-error reads");
    check(n_st[ECC_CORRECTED] > 0, "corrected reads");
    check(n_st[ECC_UNCORRECTABLE] > 0, "uncorrectable reads");
    check(n_fix > 0 && n_scrub > 0 && n_par_fix > 0, "restore, scrub, parity-chip fix");
    check(n_trans_wr > 0 && n_silent_wr > 0, "transition and non-transition writes");
    check(n_scan > 0 && n_sig > 0 && n_twr > 0, "analyzer scan, signature and write");
    check(n_colbar > 0 && n_chipfault > 0, "Column Bar and inverted word line");
    $display("mechanisms: ok=%0d latent=%0d double=%0d corrected=%0d uncorr=%0d fix=%0d scrub=%0d",
             n_st[0], n_st[1], n_st[2], n_st[3], n_st[4], n_fix, n_scrub);
    $display("  writes: transition=%0d silent=%0d; analyzer: scan=%0d sig=%0d write=%0d",
             n_trans_wr, n_silent_wr, n_scan, n_sig, n_twr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          c_test, c_mode, c_wr;
  logic [W:0]    c_req, c_din, c_scan_in;
  chip_op_e      c_op;
  logic [RW-1:0] c_row;
  logic [CW-1:0] c_col;
  logic [W:0]    c_ready, c_done, c_dout, c_scan_out;

  ecc_controller #(.W(W), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  for (genvar i = 0; i <= W; i++) begin : g_chip
    dram_chip #(.ROWS(ROWS), .COLS(COLS), .TAPS(TAPS), .PARITY_TREE(i % 2 == 0)) u_chip (
      .clk, .rst_n, .test(c_test), .mode(c_mode), .psa_wr(c_wr),
      .scan_in(c_scan_in[i]), .scan_out(c_scan_out[i]), .req(c_req[i]), .op(c_op),
      .row(c_row), .col(c_col), .din(c_din[i]), .ready(c_ready[i]), .done(c_done[i]),
      .dout(c_dout[i]));
  end
  assign t_scan_out = c_scan_out;
endmodule
