// tb_iscas_workloads: full-size run of the NB-XOR decompressor, default
// parameters, over test sets the size of those of six ISCAS'89 circuits.
//
// For each circuit the test set has the published total size (bits) and
// don't-care share; the scan chain length is that of the circuit's
// full-scan version with one chain, and the vector count is size / length.
// The cubes themselves are synthetic (random, with specified bits in short
// clusters of equal value), so the compression figures printed here show
// the trend, not the published numbers. Each set is MTC filled, NB-XOR
// transformed, coded with Golomb (group 4) and with FDR, and decompressed
// through the design into the scan chain model, every vector being checked,
// with no pauses so that the cycle count must equal code bits + scan bits +
// one cycle of latency (checked in the harness). Also printed per circuit: share of 0s after MTC
// filling and after NB-XOR, compression ratio (original - coded) / original,
// and average / peak weighted transitions for zero filling and MTC filling.
module tb_iscas_workloads;
  import nbxor_pkg::*;
  import nbxor_ref_pkg::*;

  nbxor_scan_harness h ();

  typedef struct {
    string name;
    int    bits;      // test data size
    int    chain;     // scan chain length
    int    x_pct;     // don't-care share, percent
  } circuit_t;

  localparam int NCIRC = 6;
  circuit_t circ[NCIRC] = '{
    '{"s5378",  23754,  214,  73},
    '{"s9234",  39273,  247,  73},
    '{"s13207", 165200, 700,  93},
    '{"s15850", 76986,  611,  84},
    '{"s38417", 164736, 1664, 68},
    '{"s38584", 199104, 1464, 82}
  };

  int extra_checks = 0, extra_failures = 0;

  initial begin : watchdog
    repeat (6000000) @(posedge h.clk);
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

  string  cubes[$];
  bitq_t  td, all, d, vz;
  int     cyc, n, ne;
  longint wz_sum, wz_max, wm_sum, wm_max, w;
  longint nvec;
  real    r0_mtc, r0_nb, cr;

  initial begin
    h.reset();
    for (int c = 0; c < NCIRC; c++) begin
      n = circ[c].bits / circ[c].chain;
      check(n * circ[c].chain == circ[c].bits, {circ[c].name, ": size is a whole number of vectors"});
      cubes.delete();
      all.delete();
      wz_sum = 0; wz_max = 0; wm_sum = 0; wm_max = 0;
      repeat (n) begin
        bitq_t vm;
        cubes.push_back(rand_cube(circ[c].chain, circ[c].x_pct));
        vm = mtc_fill(cubes[$]);
        vz = zero_fill(cubes[$]);
        w = wtm(vz); wz_sum += w; if (w > wz_max) wz_max = w;
        w = wtm(vm); wm_sum += w; if (w > wm_max) wm_max = w;
        foreach (vm[j]) all.push_back(vm[j]);
      end
      nvec = longint'(n);
      d = nbxor(all);
      r0_mtc = 100.0 * real'(all.size() - count_ones(all)) / real'(all.size());
      r0_nb  = 100.0 * real'(d.size() - count_ones(d)) / real'(d.size());
      $display("%-7s %0d vectors x %0d bits: 0s after MTC %5.2f%%, after NB-XOR %5.2f%%",
               circ[c].name, n, circ[c].chain, r0_mtc, r0_nb);
      $display("        WTM avg/peak: zero fill %0d/%0d, MTC fill %0d/%0d",
               wz_sum / nvec, wz_max, wm_sum / nvec, wm_max);

      ne = golomb_enc(d, GOLOMB_M_DEFAULT).size();
      h.apply_set(cubes, CODE_GOLOMB, GOLOMB_M_DEFAULT, 0, 0, 0, cyc, td);
      cr = 100.0 * real'(d.size() - ne) / real'(d.size());
      $display("        Golomb-4: %0d code bits, compression %6.2f%%, %0d cycles", ne, cr, cyc);

      ne = fdr_enc(d).size();
      h.apply_set(cubes, CODE_FDR, GOLOMB_M_DEFAULT, 0, 0, 0, cyc, td);
      cr = 100.0 * real'(d.size() - ne) / real'(d.size());
      $display("        FDR:      %0d code bits, compression %6.2f%%, %0d cycles", ne, cr, cyc);
    end

    $display("TB_RESULT checks=%0d failures=%0d", h.checks + extra_checks,
             h.failures + extra_failures);
    $finish;
  end

endmodule
