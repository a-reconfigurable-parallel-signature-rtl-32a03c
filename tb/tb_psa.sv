// tb_psa: the signature analyzer on 9 bit lines with feedback into stages
// 0 and 4, built twice (XOR tree and XOR cascade for the parity). A software
// model runs alongside: normal-mode parity of random bit lines, scan
// shifting, signature compression with feedback, write-mode drive, and no
// change without a step. Every step's quotient and stage contents are
// compared.
module tb_psa;
  localparam int M = 9;
  localparam logic [M-1:0] TAPS = 9'b0_0001_0001;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         test = 1'b0, mode = 1'b0, wr = 1'b0, step = 1'b0, scan_in = 1'b0;
  logic [M-1:0] bl_in = '0;
  logic [M-1:0] bl_out_t, bl_out_c, sig_t, sig_c;
  logic         drive_t, drive_c, so_t, so_c;

  psa #(.M(M), .TAPS(TAPS), .PARITY_TREE(1'b1)) dut_tree (
    .clk, .rst_n, .test, .mode, .wr, .step, .scan_in, .bl_in,
    .bl_out(bl_out_t), .bl_drive(drive_t), .scan_out(so_t), .sig(sig_t));
  psa #(.M(M), .TAPS(TAPS), .PARITY_TREE(1'b0)) dut_casc (
    .clk, .rst_n, .test, .mode, .wr, .step, .scan_in, .bl_in,
    .bl_out(bl_out_c), .bl_drive(drive_c), .scan_out(so_c), .sig(sig_c));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t: %s", $time, msg); end
  endtask

  logic [M-1:0] model = '0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_step(bit t, bit md, bit w, bit en, bit si, logic [M-1:0] bl);
    logic [M-1:0] nx;
    logic q;
    test = t; mode = md; wr = w; step = en; scan_in = si; bl_in = bl;
    #1;
    if (t) begin
      check(so_t == model[M-1] && so_c == model[M-1], "quotient on scan-out");
      check(drive_t == (w && !md) && drive_c == (w && !md), "bit-line drive");
      if (w) check(bl_out_t == model && bl_out_c == model, "write-mode bit lines");
    end else begin
      check(so_t == ^bl && so_c == ^bl, "word-line parity on scan-out");
      check(!drive_t && !drive_c, "no drive in normal mode");
    end
    @(negedge clk);
    if (t && en && !w) begin
      q = model[M-1];
      if (md) begin
        nx[0] = bl[0] ^ (TAPS[0] & q);
        for (int j = 1; j < M; j++) nx[j] = bl[j] ^ model[j-1] ^ (TAPS[j] & q);
        model = nx;
      end else begin
        model = {model[M-2:0], si};
      end
    end
    check(sig_t == model && sig_c == model, "stage contents");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sig_t == '0, "reset clears the stages");
    // normal mode: parity, stages untouched
    for (int k = 0; k < 40; k++) do_step(1'b0, $urandom_range(1), 1'b0, 1'b1, 1'b0, M'($urandom));
    // scan in a pattern
    for (int k = 0; k < M; k++) do_step(1'b1, 1'b0, 1'b0, 1'b1, 1'(k % 3 == 0), '0);
    // signature steps with random word lines
    for (int k = 0; k < 60; k++) do_step(1'b1, 1'b1, 1'b0, 1'b1, 1'b0, M'($urandom));
    // no step: hold
    for (int k = 0; k < 5; k++) do_step(1'b1, 1'b1, 1'b0, 1'b0, 1'b0, M'($urandom));
    // write mode: hold and drive
    for (int k = 0; k < 5; k++) do_step(1'b1, 1'b0, 1'b1, 1'b1, 1'b1, M'($urandom));
    // random mix of modes
    for (int k = 0; k < 200; k++) begin
      int m = $urandom_range(3);
      do_step(m != 0, m == 2, m == 3, 1'($urandom_range(3) != 0), 1'($urandom), M'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
