// tb_ecc_decoder: W = 8. Builds a good word with its level-2 parity, then
// applies random combinations of upsets in the word (rd_bits) and flagged
// word lines (l1_err), and checks the status, the corrected bits and the
// chip to restore against the decision table worked out independently.
module tb_ecc_decoder;
  import psa_ecc_pkg::*;
  localparam int W = 8;
  logic [W:0]   rd_bits, l1_err, corr_bits, row_err;
  logic         l2_err, fix_en;
  ecc_status_e  status;
  logic [3:0]   fix_chip;
  int checks = 0, failures = 0;

  ecc_decoder #(.W(W)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic [W-1:0] d;
      logic [W:0]   good, flips, flags;
      int nflags, nflips, only;
      ecc_status_e exp;
      d    = W'($urandom);
      good = {^d, d};
      flips = '0;
      flags = '0;
      case ($urandom_range(4))
        0: ;                                                 // clean
        1: begin only = $urandom_range(W); flips[only] = 1'b1; flags[only] = 1'b1; end
        2: flags[$urandom_range(W)] = 1'b1;                  // latent elsewhere
        3: begin flips = (W + 1)'($urandom); flags = (W + 1)'($urandom); end
        default: begin only = $urandom_range(W); flips[only] = 1'b1; end // flag cancelled
      endcase
      rd_bits = good ^ flips;
      l1_err  = flags;
      #1;
      nflags = $countones(flags);
      nflips = $countones(flips);
      if (nflips % 2 == 0) exp = (nflags == 0) ? ECC_OK : (nflags == 1) ? ECC_LATENT : ECC_DOUBLE;
      else exp = (nflags == 1) ? ECC_CORRECTED : ECC_UNCORRECTABLE;
      check(status == exp, $sformatf("status %0d expected %0d (flips %b flags %b)",
                                     status, exp, flips, flags));
      check(l2_err == (nflips % 2 == 1), "level-2 check");
      check(row_err == flags, "word-line flags");
      check(fix_en == (exp == ECC_CORRECTED), "restore request");
      if (exp == ECC_CORRECTED) begin
        check(corr_bits == (rd_bits ^ flags), "flagged bit complemented");
        check((W + 1)'(1) << fix_chip == flags, "chip to restore");
        if (flips == flags) check(corr_bits == good, "single upset corrected");
      end else begin
        check(corr_bits == rd_bits, "uncorrected word passed through");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
