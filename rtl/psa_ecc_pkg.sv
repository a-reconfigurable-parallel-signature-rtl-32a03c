// psa_ecc_pkg: types shared by the two-level parity memory system.
//
// chip_op_e   selects what a DRAM chip does with a normal-mode access:
//             OP_READ  reads the addressed cell and checks its word line;
//             OP_WRITE is the parity-maintaining write (read the cell first,
//                      toggle the row parity on a transition write);
//             OP_FIX   writes the cell and leaves the row parity alone. It
//                      restores a cell that a soft error has flipped, whose
//                      parity bit still holds the value from before the upset.
// ecc_status_e is the outcome of one word read, following the rows of the
//             decision table of the scheme (level-2 word parity against the
//             level-1 word-line parities of every chip).
package psa_ecc_pkg;

  typedef enum logic [1:0] {
    OP_READ  = 2'd0,
    OP_WRITE = 2'd1,
    OP_FIX   = 2'd2
  } chip_op_e;

  typedef enum logic [2:0] {
    ECC_OK            = 3'd0,  // no parity fails: error-free word
    ECC_LATENT        = 3'd1,  // word good, one chip flags its word line
    ECC_DOUBLE        = 3'd2,  // word parity good, two or more chips flag
    ECC_CORRECTED     = 3'd3,  // word parity fails, exactly one chip flags
    ECC_UNCORRECTABLE = 3'd4   // word parity fails, zero or several chips flag
  } ecc_status_e;

endpackage
