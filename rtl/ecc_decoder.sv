// ecc_decoder: two-level parity decision for one word read.
//
// Inputs are, for each of the W+1 chips (bit W is the level-2 parity chip),
// the bit read from the addressed cell (rd_bits) and the chip's level-1
// word-line parity check from its scan-out pin (l1_err, 1 = the word line
// read in that chip holds an odd number of upsets). The level-2 check is the
// XOR of the W data bits and the stored word parity: l2_err.
//
// Decision (one row per outcome of the scheme's error table):
//   l2 ok,   no l1     ECC_OK            error-free word
//   l2 ok,   one l1    ECC_LATENT        word good; a cell elsewhere on that
//                                        chip's word line is upset
//   l2 ok,   >=2 l1    ECC_DOUBLE        two single-bit errors detected (in
//                                        the word or on the word lines)
//   l2 fail, one l1 i  ECC_CORRECTED     the cell read from chip i is wrong:
//                                        it is complemented
//   l2 fail, 0 or >=2  ECC_UNCORRECTABLE detected, not corrected
// corr_bits is rd_bits with the located bit complemented, fix_en/fix_chip
// name the chip whose cell must be restored, row_err lists the chips whose
// word lines hold errors. The data word is corr_bits[W-1:0].
//
// Purely combinational. Follows the document's decision table; the grouping
// of its rows into five status codes is this design's own.
module ecc_decoder
  import psa_ecc_pkg::*;
#(
  parameter int unsigned W = 16,
  localparam int unsigned IW = $clog2(W + 1)
) (
  input  logic [W:0]    rd_bits,
  input  logic [W:0]    l1_err,
  output logic [W:0]    corr_bits,
  output logic          l2_err,
  output ecc_status_e   status,
  output logic          fix_en,
  output logic [IW-1:0] fix_chip,
  output logic [W:0]    row_err
);
  logic [IW:0]   n_l1;
  logic [IW-1:0] first_l1;

  always_comb begin
    n_l1     = '0;
    first_l1 = '0;
    for (int i = W; i >= 0; i--) begin
      if (l1_err[i]) begin
        n_l1     = n_l1 + 1'b1;
        first_l1 = IW'(i);
      end
    end
  end

  assign l2_err  = ^rd_bits;
  assign row_err = l1_err;

  always_comb begin
    fix_en    = 1'b0;
    corr_bits = rd_bits;
    if (!l2_err) begin
      if (n_l1 == 0)      status = ECC_OK;
      else if (n_l1 == 1) status = ECC_LATENT;
      else                status = ECC_DOUBLE;
    end else if (n_l1 == 1) begin
      status    = ECC_CORRECTED;
      fix_en    = 1'b1;
      corr_bits = rd_bits ^ l1_err;
    end else begin
      status = ECC_UNCORRECTABLE;
    end
  end

  assign fix_chip = first_l1;

endmodule
