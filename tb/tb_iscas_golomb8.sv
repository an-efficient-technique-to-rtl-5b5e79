// tb_iscas_golomb8: the decompressor built with Golomb group size 8, run
// over test sets the size of those of six ISCAS'89 circuits.
//
// Same synthetic test sets as the group-4 workload run (published size and
// don't-care share, chain length of the circuit's single-chain full-scan
// version, random clustered cubes): each set is MTC filled, NB-XOR
// transformed, Golomb coded with groups of 8 and streamed through the design
// with no pauses. Every restored scan bit is compared with the filled data,
// and the run must take one cycle per code bit read plus one per scan bit,
// plus one cycle of latency (code bits that only close a trailing run of
// zeros are read afterwards and drained).
module tb_iscas_golomb8;
  import nbxor_pkg::*;
  import nbxor_ref_pkg::*;

  localparam int unsigned GM = 8;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  init = 1'b0;
  code_e code_sel = CODE_GOLOMB;
  logic  te_valid = 1'b0, te_bit = 1'b0, te_ready;
  logic  td_valid, td_bit;
  logic  td_ready = 1'b0;

  nbxor_decomp_top #(.GOLOMB_M(GM)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
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

  typedef struct {
    string name;
    int    bits;
    int    chain;
    int    x_pct;
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

  bitq_t all, d, e;
  int    runs[$];
  int    n, sent, got, cyc, late, guard;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCIRC; c++) begin
      n = circ[c].bits / circ[c].chain;
      all.delete();
      repeat (n) begin
        bitq_t vm;
        vm = mtc_fill(rand_cube(circ[c].chain, circ[c].x_pct));
        foreach (vm[j]) all.push_back(vm[j]);
      end
      d = nbxor(all);
      e = golomb_enc(d, GM);
      runs_of(d, runs);
      late = (d[d.size()-1] == 1'b0 && runs[runs.size()-1] % GM == 0) ? 1 + $clog2(GM) : 0;

      @(negedge clk);
      init = 1'b1; code_sel = CODE_GOLOMB;
      @(negedge clk);
      init = 1'b0;
      sent = 0; got = 0; cyc = 0;
      while (got < all.size()) begin
        te_valid = (sent < e.size());
        te_bit   = (sent < e.size()) ? e[sent] : 1'b0;
        td_ready = 1'b1;
        #1;
        cyc++;
        if (te_valid && te_ready) sent++;
        if (td_valid && td_ready) begin
          check(td_bit == all[got], $sformatf("%s bit %0d", circ[c].name, got));
          got++;
        end
        @(negedge clk);
      end
      check(cyc == e.size() - late + d.size() + 1,
            $sformatf("%s: %0d cycles, expected %0d", circ[c].name, cyc, e.size() - late + d.size() + 1));
      td_ready = 1'b0;
      guard = 0;
      while (sent < e.size() && guard < 64) begin
        te_valid = 1'b1; te_bit = e[sent];
        #1;
        if (te_ready) sent++;
        guard++;
        @(negedge clk);
      end
      te_valid = 1'b0;
      check(sent == e.size(), {circ[c].name, ": every code bit consumed"});
      $display("%-7s Golomb-8: %0d code bits for %0d scan bits, compression %6.2f%%",
               circ[c].name, e.size(), d.size(), 100.0 * real'(d.size() - e.size()) / real'(d.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
