// inv_nbxor: inverse neighbouring-bit XOR (NB-XOR) stage.
//
// The off-chip encoder replaces every scan bit by the XOR of that bit and the
// bit shifted in just before it (the very first bit is kept as is). This
// stage undoes that with one flip-flop and one XOR gate: the flip-flop holds
// the last restored bit, its next value is its own value XOR the incoming
// difference bit, and its output drives the scan-in of the chain while it
// loops back into the XOR. The flip-flop starts a test set at 0, so the first
// difference bit passes through unchanged. All of this follows the
// decompression architecture of the technique.
//
// Design choices of this implementation: the streams on both sides use a
// valid/ready handshake so that the scan side can pause (capture cycles) and
// the decoder side can run dry; a valid flag next to the flip-flop marks a
// restored bit that the chain has not yet taken; `init` clears both
// synchronously at the start of a test set.
//
// Interface: nb_* is the difference stream TNB from the decoder, td_* the
// restored scan stream TD. Timing: a difference bit accepted at a clock edge
// appears on td_bit right after that edge (one register stage); with td_ready
// held high one bit per cycle passes.
module inv_nbxor (
  input  logic clk,
  input  logic rst_n,
  input  logic init,      // start of a test set: flip-flop and valid flag to 0
  // difference stream TNB
  input  logic nb_valid,
  input  logic nb_bit,
  output logic nb_ready,
  // restored scan stream TD
  output logic td_valid,
  output logic td_bit,
  input  logic td_ready
);

  logic ff_q;    // the NB-XOR flip-flop: last restored scan bit
  logic vld_q;   // ff_q holds a bit the scan chain has not taken yet

  // A new difference bit may enter when the held bit is gone or leaves now.
  assign nb_ready = !vld_q || td_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff_q  <= 1'b0;
      vld_q <= 1'b0;
    end else if (init) begin
      ff_q  <= 1'b0;
      vld_q <= 1'b0;
    end else begin
      if (nb_valid && nb_ready) ff_q <= ff_q ^ nb_bit;
      if (nb_ready)             vld_q <= nb_valid;
    end
  end

  assign td_bit   = ff_q;
  assign td_valid = vld_q;

  // A restored bit stays put until the scan chain takes it.
  a_td_hold : assert property (@(posedge clk) disable iff (!rst_n || init)
                               td_valid && !td_ready |=> td_valid && $stable(td_bit));

endmodule
