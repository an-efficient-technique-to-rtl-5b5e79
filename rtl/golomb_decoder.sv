// golomb_decoder: serial decoder for Golomb-coded runs of zeros.
//
// The NB-XOR difference stream is mostly 0s. It is cut into runs, each run
// being L zeros followed by a 1. A Golomb code with group size M (a power of
// two) sends a run as a unary prefix and a binary tail: floor(L/M) ones, a
// zero, then L mod M in log2(M) bits, most significant bit first. Each prefix
// 1 therefore stands for M zeros, and the tail gives the zeros left before
// the terminating 1. The decompressor is evaluated with this code at group
// sizes 4 (the default here) and 8; the code itself is the standard Golomb
// code, and this decoder's structure (a small state machine and a
// log2(M)+1-bit down-counter) is this design's own, simplest form.
//
// Interface: te_* is the compressed bit stream from the tester, nb_* the
// decoded difference stream; both use valid/ready. The decoder either reads
// one code bit or emits one decoded bit per cycle, never both. Timing: one
// cycle per prefix or tail bit read, then one cycle per emitted bit, so a run
// of L zeros costs floor(L/M) + 1 + log2(M) input cycles plus L + 1 output
// cycles. `init` returns it to the start of a codeword. The last run of a
// test set that does not end in 1 is sent as if it did; the extra 1 is left
// unshifted by the scan controller.
module golomb_decoder #(
  parameter int unsigned M = nbxor_pkg::GOLOMB_M_DEFAULT   // group size, power of two >= 2
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

  localparam int unsigned TW = $clog2(M);   // tail width
  localparam int unsigned CW = TW + 1;      // counter holds 0..M

  if (M < 2 || (1 << TW) != M) begin : g_bad_m
    $error("golomb_decoder: M must be a power of two, at least 2");
  end

  typedef enum logic [1:0] {
    S_PREFIX,   // reading unary prefix bits
    S_TAIL,     // reading the log2(M)-bit tail
    S_ZEROS,    // emitting cnt_q zeros
    S_ONE       // emitting the run's terminating 1
  } state_e;

  state_e            state_q;
  logic [CW-1:0]     cnt_q;      // zeros still to emit / tail being assembled
  logic [TW-1:0]     left_q;     // tail bits still to read, minus one
  logic              term_q;     // the zeros in progress end with a 1

  logic take_in, give_out;
  assign te_ready = (state_q == S_PREFIX) || (state_q == S_TAIL);
  assign nb_valid = (state_q == S_ZEROS) || (state_q == S_ONE);
  assign nb_bit   = (state_q == S_ONE);
  assign take_in  = te_valid && te_ready;
  assign give_out = nb_valid && nb_ready;

  logic [CW-1:0] tail_next;
  assign tail_next = {cnt_q[CW-2:0], te_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_PREFIX;
      cnt_q   <= '0;
      left_q  <= '0;
      term_q  <= 1'b0;
    end else if (init) begin
      state_q <= S_PREFIX;
      cnt_q   <= '0;
      left_q  <= '0;
      term_q  <= 1'b0;
    end else begin
      unique case (state_q)
        S_PREFIX: if (take_in) begin
          if (te_bit) begin
            // one whole group of M zeros, no terminating 1
            cnt_q   <= CW'(M);
            term_q  <= 1'b0;
            state_q <= S_ZEROS;
          end else begin
            cnt_q   <= '0;
            left_q  <= TW'(TW - 1);
            state_q <= S_TAIL;
          end
        end
        S_TAIL: if (take_in) begin
          cnt_q  <= tail_next;
          left_q <= left_q - 1'b1;
          if (left_q == '0) begin
            term_q  <= 1'b1;
            state_q <= (tail_next == '0) ? S_ONE : S_ZEROS;
          end
        end
        S_ZEROS: if (give_out) begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CW'(1)) state_q <= term_q ? S_ONE : S_PREFIX;
        end
        S_ONE: if (give_out) state_q <= S_PREFIX;
        default: state_q <= S_PREFIX;
      endcase
    end
  end

  a_no_both : assert property (@(posedge clk) disable iff (!rst_n) !(te_ready && nb_valid));
  a_zeros_nonempty : assert property (@(posedge clk) disable iff (!rst_n)
                                      state_q == S_ZEROS |-> cnt_q != '0);

endmodule
