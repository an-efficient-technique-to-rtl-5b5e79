// fdr_decoder: serial decoder for frequency-directed run-length (FDR) codes.
//
// The difference stream is cut into runs of L zeros each ended by a 1. FDR
// puts run lengths into groups A1, A2, ...: group Ak holds L = 2**k - 2 up to
// 2**(k+1) - 3. A codeword is a prefix of k-1 ones and a zero, naming the
// group, followed by a k-bit tail giving L - (2**k - 2), most significant bit
// first. Examples: L=0 -> 00, L=1 -> 01, L=2 -> 1000, L=6 -> 110000. The
// decompressor is evaluated with this standard code; the decoder's structure
// (count prefix ones into k, shift in k tail bits, then count the run down)
// is this design's own, simplest form.
//
// Interface: te_* is the compressed bit stream from the tester, nb_* the
// decoded difference stream, both valid/ready. The decoder either reads one
// code bit or emits one decoded bit per cycle, never both. Timing: a run of
// group Ak costs 2k input cycles and L + 1 output cycles. RUN_W bounds the
// run counter: groups up to A(RUN_W-1), i.e. runs of up to 2**RUN_W - 3
// zeros; a longer prefix is a malformed stream and is flagged by an
// assertion. `init` returns the decoder to the start of a codeword. The last
// run of a test set that does not end in 1 is sent as if it did; the extra 1
// is left unshifted by the scan controller.
module fdr_decoder #(
  parameter int unsigned RUN_W = nbxor_pkg::RUN_W_DEFAULT   // run counter width
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  // compressed stream TE
  input  logic te_valid,
  input  logic te_bit,
  output logic te_ready,
  // decoded difference stream TNB
  output logic nb_valid,
  output logic nb_bit,
  input  logic nb_ready
);

  localparam int unsigned KW   = $clog2(RUN_W) + 1;   // holds k = 1 .. RUN_W
  localparam int unsigned KMAX = RUN_W - 1;           // largest group index

  if (RUN_W < 3) begin : g_bad_w
    $error("fdr_decoder: RUN_W must be at least 3");
  end

  typedef enum logic [1:0] {
    S_PREFIX,   // counting the group prefix
    S_TAIL,     // reading the k-bit tail
    S_ZEROS,    // emitting cnt_q zeros
    S_ONE       // emitting the run's terminating 1
  } state_e;

  state_e           state_q;
  logic [KW-1:0]    k_q;       // group index while in the prefix
  logic [KW-1:0]    left_q;    // tail bits still to read
  logic [RUN_W-3:0] off_q;     // tail bits read so far (at most k-1 of them)
  logic [RUN_W-1:0] cnt_q;     // zeros still to emit
  logic [RUN_W-1:0] base;      // 2**k - 2, first run length of group k
  logic [RUN_W-2:0] off_next;
  logic [RUN_W-1:0] run_len;

  logic take_in, give_out;
  assign te_ready = (state_q == S_PREFIX) || (state_q == S_TAIL);
  assign nb_valid = (state_q == S_ZEROS) || (state_q == S_ONE);
  assign nb_bit   = (state_q == S_ONE);
  assign take_in  = te_valid && te_ready;
  assign give_out = nb_valid && nb_ready;

  assign base     = (RUN_W'(1) << k_q) - RUN_W'(2);
  assign off_next = {off_q, te_bit};
  assign run_len  = base + RUN_W'(off_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_PREFIX;
      k_q     <= KW'(1);
      left_q  <= '0;
      off_q   <= '0;
      cnt_q   <= '0;
    end else if (init) begin
      state_q <= S_PREFIX;
      k_q     <= KW'(1);
      left_q  <= '0;
      off_q   <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_PREFIX: if (take_in) begin
          if (te_bit) begin
            k_q <= k_q + 1'b1;
          end else begin
            left_q  <= k_q;
            off_q   <= '0;
            state_q <= S_TAIL;
          end
        end
        S_TAIL: if (take_in) begin
          off_q  <= off_next[RUN_W-3:0];
          left_q <= left_q - 1'b1;
          if (left_q == KW'(1)) begin
            cnt_q   <= run_len;
            k_q     <= KW'(1);
            state_q <= (run_len == '0) ? S_ONE : S_ZEROS;
          end
        end
        S_ZEROS: if (give_out) begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == RUN_W'(1)) state_q <= S_ONE;
        end
        S_ONE: if (give_out) state_q <= S_PREFIX;
        default: state_q <= S_PREFIX;
      endcase
    end
  end

  a_no_both : assert property (@(posedge clk) disable iff (!rst_n) !(te_ready && nb_valid));
  a_group_range : assert property (@(posedge clk) disable iff (!rst_n)
                                   state_q == S_PREFIX |-> k_q <= KW'(KMAX));

endmodule
