// nbxor_decomp_top: NB-XOR based decompressor for low-power scan test data.
//
// Scan test data whose don't-cares were filled for minimum transitions
// (MTC filling) consists of long runs of 0s and 1s, which run-length codes
// compress badly. The tester therefore stores it NB-XOR transformed: every
// bit XORed with the bit shifted in just before it, which leaves a stream
// that is almost all 0s, and then run-length coded. On chip, a decoder
// expands the coded stream TE into the difference stream TNB and one XOR gate
// with one flip-flop (inv_nbxor) turns TNB back into the scan data TD, which
// is shifted into the single scan chain of the core under test. The core is
// not changed. This chain (decoder, then XOR and flip-flop, flip-flop output
// to scan-in) follows the decompression architecture of the technique.
//
// Design choices: the generic decoder is provided as two standard codes the
// technique is evaluated with, Golomb (group size GOLOMB_M) and FDR, with the
// code of a test set chosen by code_sel and taken on `init`; the decoder that
// is not chosen sees no traffic. Both streams use a valid/ready handshake:
// te_ready tells the tester when a code bit is consumed, td_ready is the scan
// controller's shift enable (low during capture cycles). `init` starts a test
// set: it clears the XOR flip-flop to 0 and both decoders.
//
// Timing: one code bit read or one difference bit produced per cycle; a
// difference bit accepted at a clock edge is on td_bit right after that edge.
module nbxor_decomp_top #(
  parameter int unsigned GOLOMB_M = nbxor_pkg::GOLOMB_M_DEFAULT,  // Golomb group size
  parameter int unsigned RUN_W    = nbxor_pkg::RUN_W_DEFAULT      // FDR run counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,       // start of a test set
  input  nbxor_pkg::code_e code_sel,   // code of the test set, taken on init
  // compressed stream TE from the tester
  input  logic             te_valid,
  input  logic             te_bit,
  output logic             te_ready,
  // restored scan stream TD to the scan-in of the chain
  output logic             td_valid,
  output logic             td_bit,
  input  logic             td_ready
);

  import nbxor_pkg::*;

  code_e code_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    code_q <= CODE_GOLOMB;
    else if (init) code_q <= code_sel;
  end

  // Decoder side ------------------------------------------------------------
  logic g_te_ready, g_nb_valid, g_nb_bit;
  logic f_te_ready, f_nb_valid, f_nb_bit;
  logic nb_valid, nb_bit, nb_ready;
  logic use_fdr;
  assign use_fdr = (code_q == CODE_FDR);

  golomb_decoder #(.M(GOLOMB_M)) u_golomb (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (init),
    .te_valid (te_valid && !use_fdr),
    .te_bit   (te_bit),
    .te_ready (g_te_ready),
    .nb_valid (g_nb_valid),
    .nb_bit   (g_nb_bit),
    .nb_ready (nb_ready && !use_fdr)
  );

  fdr_decoder #(.RUN_W(RUN_W)) u_fdr (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (init),
    .te_valid (te_valid && use_fdr),
    .te_bit   (te_bit),
    .te_ready (f_te_ready),
    .nb_valid (f_nb_valid),
    .nb_bit   (f_nb_bit),
    .nb_ready (nb_ready && use_fdr)
  );

  // While init is high nothing is consumed: the decoders are being cleared.
  assign te_ready = !init && (use_fdr ? f_te_ready : g_te_ready);
  assign nb_valid = use_fdr ? f_nb_valid : g_nb_valid;
  assign nb_bit   = use_fdr ? f_nb_bit   : g_nb_bit;

  // Inverse NB-XOR: one XOR gate and one flip-flop ---------------------------
  inv_nbxor u_inv (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (init),
    .nb_valid (nb_valid),
    .nb_bit   (nb_bit),
    .nb_ready (nb_ready),
    .td_valid (td_valid),
    .td_bit   (td_bit),
    .td_ready (td_ready)
  );

endmodule
