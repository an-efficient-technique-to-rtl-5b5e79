// nbxor_scan_harness: test harness around the NB-XOR decompressor.
//
// It plays the tester and the scan controller of the core under test. The
// task apply_set takes a list of test cubes (strings of 0/1/X, first
// character scanned in first), fills them with the reference MTC filling,
// NB-XOR transforms the whole set in scan order, codes it with the chosen
// run-length code and sends it through the decompressor with random tester
// gaps, random shift pauses and a capture window of `capture` cycles after
// every vector. A shift-register model of the single scan chain collects
// the restored bits; after each vector its whole content is compared with
// the filled vector. Mechanism counters record what the run exercised.
// With no gaps, pauses or capture windows the run must take exactly one
// cycle per code bit and per scan bit, plus one cycle of latency; code bits
// that only close a trailing run of zeros (a final Golomb codeword whose
// zeros were all sent as whole groups) are read after the last scan bit and
// are not counted. They are drained before the task returns.
module nbxor_scan_harness;
  import nbxor_pkg::*;
  import nbxor_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  init = 1'b0;
  code_e code_sel = CODE_GOLOMB;
  logic  te_valid = 1'b0, te_bit = 1'b0, te_ready;
  logic  td_valid, td_bit;
  logic  td_ready = 1'b0;

  nbxor_decomp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_init = 0, n_code_switch = 0, n_golomb_sets = 0, n_fdr_sets = 0;
  int n_golomb_group = 0, n_golomb_tail = 0, n_fdr_group_a1 = 0, n_fdr_group_hi = 0;
  int n_backpressure = 0, n_capture_hold = 0, n_starve = 0, n_trailing_run = 0;
  // totals over all sets
  int     tot_bits = 0, tot_code_bits = 0, tot_ones_mtc = 0, tot_ones_nb = 0;
  int     tot_cycles = 0;
  code_e  last_code = CODE_GOLOMB;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic reset();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Returns the number of cycles from init to the last restored bit taken.
  task automatic apply_set(string cubes[$], code_e code, int gm, int gap_pct,
                           int stall_pct, int capture, output int cyc,
                           output bitq_t td_all);
    bitq_t vd[$];
    bitq_t d, e, chain;
    int    runs[$];
    int    l, n, sent, shifted, vec, cap_left, late, guard;

    l = cubes[0].len();
    n = cubes.size();
    td_all.delete();
    foreach (cubes[v]) begin
      vd.push_back(mtc_fill(cubes[v]));
      foreach (vd[v][j]) td_all.push_back(vd[v][j]);
    end
    d = nbxor(td_all);
    e = (code == CODE_FDR) ? fdr_enc(d) : golomb_enc(d, gm);
    runs_of(d, runs);
    foreach (runs[r]) begin
      if (code == CODE_FDR) begin
        if (fdr_group(runs[r]) >= 2) n_fdr_group_hi++; else n_fdr_group_a1++;
      end else begin
        if (runs[r] >= gm) n_golomb_group++;
        if (runs[r] % gm != 0) n_golomb_tail++;
      end
    end
    late = 0;
    if (d[d.size()-1] == 1'b0) begin
      n_trailing_run++;
      if (code == CODE_GOLOMB && runs[runs.size()-1] % gm == 0) late = 1 + $clog2(gm);
    end
    if (code == CODE_FDR) n_fdr_sets++; else n_golomb_sets++;
    if (n_init > 0 && code != last_code) n_code_switch++;
    last_code = code;
    tot_bits      += d.size();
    tot_code_bits += e.size();
    tot_ones_mtc  += count_ones(td_all);
    tot_ones_nb   += count_ones(d);

    // start the test set
    @(negedge clk);
    code_sel = code;
    init     = 1'b1;
    te_valid = 1'b0;
    td_ready = 1'b0;
    @(negedge clk);
    init = 1'b0;
    n_init++;

    chain = {};
    repeat (l) chain.push_back(1'b0);
    sent = 0; shifted = 0; vec = 0; cap_left = 0; cyc = 0;
    while (vec < n) begin
      te_valid = (sent < e.size()) && (($urandom % 100) >= 32'(gap_pct));
      te_bit   = (sent < e.size()) ? e[sent] : 1'b0;
      td_ready = (cap_left == 0) && (($urandom % 100) >= 32'(stall_pct));
      #1;
      cyc++;
      if (te_valid && te_ready) sent++;
      if (sent < e.size() && te_ready && !te_valid) n_starve++;
      if (td_valid && !td_ready) begin
        if (cap_left > 0) n_capture_hold++; else n_backpressure++;
      end
      if (cap_left > 0) cap_left--;
      else if (td_valid && td_ready) begin
        // chain[0] is scan-in; after l shifts chain[l-1] holds the first bit
        void'(chain.pop_back());
        chain.push_front(td_bit);
        shifted++;
        if (shifted == l) begin
          for (int j = 0; j < l; j++)
            check(chain[l-1-j] == vd[vec][j], $sformatf("vector %0d bit %0d", vec, j));
          vec++;
          shifted = 0;
          cap_left = capture;
        end
      end
      @(negedge clk);
    end
    if (gap_pct == 0 && stall_pct == 0 && capture == 0)
      check(cyc == e.size() - late + d.size() + 1,
            $sformatf("%0d cycles, expected %0d code + %0d scan + 1", cyc, e.size() - late, d.size()));
    // drain code bits that only close the trailing run
    td_ready = 1'b0;
    guard = 0;
    while (sent < e.size() && guard < 64) begin
      te_valid = 1'b1;
      te_bit   = e[sent];
      #1;
      if (te_ready) sent++;
      guard++;
      @(negedge clk);
    end
    check(sent == e.size(), "every code bit consumed");
    te_valid = 1'b0;
    td_ready = 1'b0;
    tot_cycles += cyc;
  endtask

endmodule
