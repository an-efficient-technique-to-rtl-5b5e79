// tb_fdr_decoder: self-checking testbench of the FDR decoder.
//
// Two decoders, run counter widths 20 (the default) and 5, get difference
// streams built from chosen run lengths (0, 1, the first and last length of
// each group A1..A11, the longest run a 5-bit counter allows, random runs, a
// stream ending in zeros) coded by the reference FDR encoder. The tester side pauses and the scan side stalls at random;
// every decoded bit is compared with the original stream. With both sides
// always ready the decoder takes exactly one cycle per code bit plus one per
// decoded bit, which is checked too. init between streams is exercised.
module tb_fdr_decoder;
  import nbxor_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init = 1'b0;
  logic te_valid[2], te_bit[2], te_ready[2];
  logic nb_valid[2], nb_bit[2], nb_ready[2];
  int   checks = 0, failures = 0;

  fdr_decoder dut20 (
    .clk, .rst_n, .init,
    .te_valid(te_valid[0]), .te_bit(te_bit[0]), .te_ready(te_ready[0]),
    .nb_valid(nb_valid[0]), .nb_bit(nb_bit[0]), .nb_ready(nb_ready[0]));

  fdr_decoder #(.RUN_W(5)) dut5 (
    .clk, .rst_n, .init,
    .te_valid(te_valid[1]), .te_bit(te_bit[1]), .te_ready(te_ready[1]),
    .nb_valid(nb_valid[1]), .nb_bit(nb_bit[1]), .nb_ready(nb_ready[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Build a difference stream from run lengths; optionally end in zeros.
  function automatic bitq_t stream_of(int runs[$], int tail_zeros);
    bitq_t d;
    foreach (runs[r]) begin
      repeat (runs[r]) d.push_back(1'b0);
      d.push_back(1'b1);
    end
    repeat (tail_zeros) d.push_back(1'b0);
    return d;
  endfunction

  // Feed code stream e to decoder i and compare its output with d (plus the
  // extra 1 that closes a trailing run of zeros). Returns cycles used.
  task automatic run(int i, bitq_t d, bitq_t e, int gap_pct, int stall_pct, output int cyc);
    bitq_t exp;
    int    sent, got;
    exp = d;
    if (d.size() == 0 || d[d.size()-1] == 1'b0) exp.push_back(1'b1);
    sent = 0; got = 0; cyc = 0;
    while (got < exp.size()) begin
      @(negedge clk);
      te_valid[i] = (sent < e.size()) && (($urandom % 100) >= 32'(gap_pct));
      te_bit[i]   = (sent < e.size()) ? e[sent] : 1'b0;
      nb_ready[i] = (($urandom % 100) >= 32'(stall_pct));
      #1;
      if (te_valid[i] && te_ready[i]) sent++;
      if (nb_valid[i] && nb_ready[i]) begin
        check(nb_bit[i] == exp[got], $sformatf("dut%0d bit %0d", i, got));
        got++;
      end
      cyc++;
    end
    @(negedge clk);
    te_valid[i] = 1'b0;
    nb_ready[i] = 1'b0;
    check(sent == e.size(), "all code bits consumed");
  endtask

  task automatic pulse_init();
    @(negedge clk); init = 1'b1;
    @(negedge clk); init = 1'b0;
  endtask

  int    runs[$];
  bitq_t d, e;
  int    cyc;

  initial begin
    for (int i = 0; i < 2; i++) begin
      te_valid[i] = 1'b0; te_bit[i] = 1'b0; nb_ready[i] = 1'b0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 2; i++) begin
      // corner run lengths: both ends of every group the counter holds
      if (i == 0) begin
        runs = '{0, 1, 0, 0};
        for (int k = 2; k <= 11; k++) begin
          runs.push_back((1 << k) - 2);
          runs.push_back((1 << (k + 1)) - 3);
        end
      end else begin
        runs = '{0, 1, 2, 5, 6, 13, 14, 29, 0, 1};   // 29 = 2**5 - 3, group A4
      end
      d = stream_of(runs, 0);
      e = fdr_enc(d);
      run(i, d, e, 0, 0, cyc);
      check(cyc == e.size() + d.size(),
            $sformatf("dut%0d: %0d cycles for %0d code + %0d data bits", i, cyc, e.size(), d.size()));

      // random runs with random gaps and stalls, stream ending in zeros
      pulse_init();
      runs.delete();
      for (int r = 0; r < 400; r++) runs.push_back(($urandom % 4 == 0) ? int'($urandom % ((i == 0) ? 200 : 30)) : int'($urandom % 12));
      d = stream_of(runs, (i == 0) ? 13 : 4);
      e = fdr_enc(d);
      run(i, d, e, 25, 25, cyc);

      // init in the middle of a codeword returns to the codeword start
      @(negedge clk);
      te_valid[i] = 1'b1; te_bit[i] = 1'b1;    // a prefix 1, codeword pending
      @(negedge clk);
      te_valid[i] = 1'b0;
      pulse_init();
      d = stream_of('{5, 0, 9}, 0);
      e = fdr_enc(d);
      run(i, d, e, 10, 10, cyc);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
