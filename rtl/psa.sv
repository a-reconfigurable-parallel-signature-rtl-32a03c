// psa: reconfigurable parallel signature analyzer sitting on the bit lines
// of one DRAM word line.
//
// M stages, one per bit line; the last bit line is the row-parity column.
// With TEST=1 the analyzer is the memory test register:
//   scan      (MODE=0, WRITE=0): on each step the stages shift by one,
//             stage 0 takes scan_in, scan_out shows the last stage.
//   signature (MODE=1, WRITE=0): on each step stage j takes
//             bl_in[j] ^ stage[j-1] (stage 0 takes bl_in[0] ^ quotient), and
//             the quotient (the last stage) is also XORed into every stage
//             whose bit is set in TAPS: the feedback polynomial.
//   write     (MODE=0, WRITE=1): the stages hold and drive the bit lines
//             (bl_drive=1, bl_out = stages) so a whole row is written at once.
// With TEST=0 the flip-flops and the feedback XORs are bypassed and the
// per-stage XORs of bit line j and the value passed from stage j-1 form a
// parity generator over all bit lines: scan_out is then the XOR of every cell
// of the selected word line, parity column included, i.e. 1 when the row
// holds a single-bit error. PARITY_TREE=0 builds that parity as the
// stage-by-stage cascade, PARITY_TREE=1 as a balanced XOR tree with
// logarithmic depth. Both give the same value.
//
// Timing: `step` is one evaluation of the analyzer (one memory cycle of the
// test procedure); the stages change on the rising clk edge where step=1.
// scan_out in normal mode is combinational from bl_in.
//
// Follows the document: the three test modes and their control encoding,
// the XOR-per-bit-line structure, bypassing flip-flops and feedback when
// TEST=0, cascade versus tree. Own choices: a single-phase edge-triggered
// register in place of the two-phase dynamic stage, the asynchronous reset
// that clears the stages, and the default polynomial (feedback into stage 0
// only, x^M + 1), since no polynomial is given.
module psa #(
  parameter int unsigned M           = 257,
  parameter logic [M-1:0] TAPS       = 1,
  parameter bit          PARITY_TREE = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test,      // TEST: 1 = test register, 0 = parity checker
  input  logic         mode,      // MODE: 1 = signature
  input  logic         wr,        // WRITE: 1 = drive stages onto the bit lines
  input  logic         step,      // evaluate once
  input  logic         scan_in,
  input  logic [M-1:0] bl_in,     // bit lines of the selected word line
  output logic [M-1:0] bl_out,    // value driven onto the bit lines in write mode
  output logic         bl_drive,
  output logic         scan_out,  // quotient bit (test) or word-line parity (normal)
  output logic [M-1:0] sig        // current stage contents
);

  logic [M-1:0] ff;
  logic [M-1:0] sig_next;
  logic         quot;
  logic         row_parity;

  assign quot = ff[M-1];

  // Signature step: per-bit-line XOR with the preceding stage plus the
  // polynomial feedback of the quotient.
  always_comb begin
    sig_next[0] = bl_in[0] ^ (TAPS[0] & quot);
    for (int j = 1; j < M; j++)
      sig_next[j] = bl_in[j] ^ ff[j-1] ^ (TAPS[j] & quot);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ff <= '0;
    else if (test && step) begin
      if (mode && !wr)
        ff <= sig_next;
      else if (!mode && !wr)
        ff <= {ff[M-2:0], scan_in};
      // write mode: stages hold
    end
  end

  // Normal mode: XOR cascade (Fig. 6(a) style) or XOR tree (Fig. 6(b) style).
  generate
    if (PARITY_TREE) begin : g_tree
      assign row_parity = ^bl_in;
    end else begin : g_cascade
      logic [M-1:0] chain;
      assign chain[0] = bl_in[0];
      for (genvar j = 1; j < M; j++) begin : g_stage
        assign chain[j] = chain[j-1] ^ bl_in[j];
      end
      assign row_parity = chain[M-1];
    end
  endgenerate

  assign scan_out = test ? quot : row_parity;
  assign bl_out   = ff;
  assign bl_drive = test && wr && !mode;
  assign sig      = ff;

  // MODE=1 with WRITE=1 is not one of the analyzer's modes.
  a_mode_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                 (test && step) |-> !(mode && wr));

endmodule
