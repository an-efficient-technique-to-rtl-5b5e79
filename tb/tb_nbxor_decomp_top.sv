// tb_nbxor_decomp_top: end-to-end testbench of the NB-XOR decompressor at
// its default parameters (Golomb group size 4, 20-bit FDR run counter).
//
// Test sets, each sent through tester -> decoder -> inverse NB-XOR -> scan
// chain model and compared vector by vector after MTC filling:
//  1. the 30-bit example cube "1xxxxx111xxxx0000xx00011111xxx": its filled
//     form must be 13 ones, 9 zeros, 8 ones (21 ones) and its NB-XOR form
//     must hold 3 ones; sent Golomb coded with no pauses, checking the rate
//     of one cycle per code bit plus one per scan bit, plus one cycle of
//     latency;
//  2. random cubes, FDR coded, tester gaps, shift pauses, capture windows;
//  3. random cubes, Golomb coded, same disturbances (a code switch);
//  4. fully specified random vectors (no X), FDR, ending in zeros;
//  5. the same FDR set with no pauses, checking the rate again.
// Every mechanism (both codes, Golomb whole groups and tails, FDR groups A1
// and above, code switch, tester starvation, scan back-pressure, capture
// hold, trailing run of zeros) must have happened at least once.
module tb_nbxor_decomp_top;
  import nbxor_pkg::*;
  import nbxor_ref_pkg::*;

  nbxor_scan_harness h ();

  int extra_checks = 0, extra_failures = 0;

  initial begin : watchdog
    repeat (300000) @(posedge h.clk);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks + extra_checks,
             h.failures + extra_failures + 1);
    $finish;
  end

  task automatic check(bit cond, string what);
    extra_checks++;
    if (!cond) begin
      extra_failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic need(int count, string what);
    check(count > 0, $sformatf("mechanism never happened: %s", what));
    $display("  %-28s %0d", what, count);
  endtask

  string  cubes[$];
  bitq_t  td, vd, dnb;
  int     cyc, nd, ne;
  string  s;

  initial begin
    h.reset();

    // 1. the worked example
    s = "1xxxxx111xxxx0000xx00011111xxx";
    s = s.toupper();
    vd  = mtc_fill(s);
    dnb = nbxor(vd);
    check(count_ones(vd) == 21, "example: 21 ones after MTC filling");
    check(count_ones(dnb) == 3, "example: 3 ones after NB-XOR");
    for (int j = 0; j < 30; j++)
      check(vd[j] == ((j < 13) || (j >= 22)), $sformatf("example filled bit %0d", j));
    cubes = '{s};
    nd = dnb.size();
    ne = golomb_enc(dnb, 4).size();
    h.apply_set(cubes, CODE_GOLOMB, 4, 0, 0, 0, cyc, td);
    check(cyc == ne + nd + 1,
          $sformatf("example: %0d cycles, expected %0d code + %0d scan + 1", cyc, ne, nd));
    check(td.size() == 30 && count_ones(td) == 21, "example: restored set");

    // 2. random cubes, FDR, with disturbances
    cubes.delete();
    repeat (20) cubes.push_back(rand_cube(37, 75));
    h.apply_set(cubes, CODE_FDR, 4, 20, 15, 3, cyc, td);

    // 3. random cubes, Golomb, with disturbances
    cubes.delete();
    repeat (15) cubes.push_back(rand_cube(64, 85));
    h.apply_set(cubes, CODE_GOLOMB, 4, 20, 15, 2, cyc, td);

    // 4. fully specified vectors, FDR, last vector ending in zeros
    cubes.delete();
    repeat (8) cubes.push_back(rand_cube(40, 0));
    cubes.push_back({rand_cube(30, 0), "1000000000"});
    h.apply_set(cubes, CODE_FDR, 4, 10, 10, 1, cyc, td);

    // 5. same kind of set, FDR, no pauses: rate check
    cubes.delete();
    repeat (10) cubes.push_back(rand_cube(50, 80));
    vd.delete();
    foreach (cubes[v]) begin
      bitq_t t;
      t = mtc_fill(cubes[v]);
      foreach (t[j]) vd.push_back(t[j]);
    end
    dnb = nbxor(vd);
    nd = dnb.size();
    ne = fdr_enc(dnb).size();
    h.apply_set(cubes, CODE_FDR, 4, 0, 0, 0, cyc, td);
    check(cyc == ne + nd + 1,
          $sformatf("FDR set: %0d cycles, expected %0d code + %0d scan + 1", cyc, ne, nd));

    $display("mechanisms:");
    need(h.n_golomb_sets,  "Golomb coded sets");
    need(h.n_fdr_sets,     "FDR coded sets");
    need(h.n_code_switch,  "code switches on init");
    need(h.n_golomb_group, "Golomb whole groups");
    need(h.n_golomb_tail,  "Golomb nonzero tails");
    need(h.n_fdr_group_a1, "FDR runs in group A1");
    need(h.n_fdr_group_hi, "FDR runs in groups A2+");
    need(h.n_starve,       "tester starvation cycles");
    need(h.n_backpressure, "shift pause cycles");
    need(h.n_capture_hold, "capture hold cycles");
    need(h.n_trailing_run, "sets ending in zeros");

    $display("TB_RESULT checks=%0d failures=%0d", h.checks + extra_checks,
             h.failures + extra_failures);
    $finish;
  end

endmodule
