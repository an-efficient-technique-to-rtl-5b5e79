// nbxor_pkg: types and constants shared by the NB-XOR scan-data decompressor.
//
// The decompressor restores low-power (MTC-filled) scan data from a
// run-length coded stream of NB-XOR difference bits. The on-chip decoder in
// front of the inverse NB-XOR stage is generic; this design offers the two
// fixed run-length codes evaluated with the technique, Golomb and FDR, and
// selects one per test set. The code_e encoding below is a design choice.
package nbxor_pkg;

  // Which run-length code the compressed stream TE uses.
  typedef enum logic {
    CODE_GOLOMB = 1'b0,
    CODE_FDR    = 1'b1
  } code_e;

  // Default Golomb group size (the main evaluation uses groups of 4).
  localparam int unsigned GOLOMB_M_DEFAULT = 4;

  // Default width of the run-length counter of the FDR decoder: runs of up to
  // 2**20 - 3 zeros, longer than any test set of the evaluated circuits.
  localparam int unsigned RUN_W_DEFAULT = 20;

endpackage
