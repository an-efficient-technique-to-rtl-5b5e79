// tb_inv_nbxor: self-checking testbench of the inverse NB-XOR stage.
//
// Sends random difference bits with random gaps while the scan side pauses at
// random, and checks every bit the scan side takes against a running XOR of
// the accepted bits (the flip-flop starting at 0). Also checks that init
// clears the flip-flop, that a stalled bit holds, and the timing: with both
// sides always ready, N bits leave in N+1 cycles (one register stage).
module tb_inv_nbxor;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init = 1'b0;
  logic nb_valid = 1'b0, nb_bit = 1'b0, nb_ready;
  logic td_valid, td_bit;
  logic td_ready = 1'b0;
  int   checks = 0, failures = 0;

  inv_nbxor dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Scoreboard: expected restored bits in order.
  bit exp_q[$];
  bit acc;
  int taken;

  // Drive one run of n bits; gap_pct / stall_pct percent idle cycles.
  task automatic run(int n, int gap_pct, int stall_pct);
    int sent;
    sent = 0; taken = 0;
    while (taken < n) begin
      // drive at the falling edge, sample what the rising edge will see
      @(negedge clk);
      nb_valid = (sent < n) && (($urandom % 100) >= 32'(gap_pct));
      nb_bit   = (($urandom % 8) == 0);
      td_ready = (($urandom % 100) >= 32'(stall_pct));
      #1;
      if (td_valid && td_ready) begin
        check(exp_q.size() > 0 && td_bit == exp_q[0], $sformatf("bit %0d", taken));
        void'(exp_q.pop_front());
        taken++;
      end
      if (nb_valid && nb_ready) begin
        acc = acc ^ nb_bit;
        exp_q.push_back(acc);
        sent++;
      end
    end
    @(negedge clk);
    nb_valid = 1'b0;
    td_ready = 1'b0;
  endtask

  logic held;
  int   cyc;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check(td_valid == 1'b0 && td_bit == 1'b0, "reset state");

    // random traffic with gaps and stalls
    acc = 1'b0;
    run(3000, 30, 30);

    // init clears flip-flop and valid flag
    @(negedge clk);
    nb_valid = 1'b1; nb_bit = 1'b1; td_ready = 1'b0;
    @(negedge clk);
    nb_valid = 1'b0;
    @(negedge clk);
    check(td_valid == 1'b1, "bit held while stalled");
    held = td_bit;
    repeat (3) @(negedge clk);
    check(td_valid == 1'b1 && td_bit == held, "held bit stable");
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    #1;
    check(td_valid == 1'b0 && td_bit == 1'b0, "init clears");

    // first difference bit passes unchanged after init: d=1 -> b=1
    exp_q.delete(); acc = 1'b0;
    run(500, 0, 0);

    // timing: 64 bits with both sides always ready take 65 cycles
    @(negedge clk); init = 1'b1; @(negedge clk); init = 1'b0;
    exp_q.delete(); acc = 1'b0;
    cyc = 0; taken = 0;
    while (taken < 64) begin
      @(negedge clk);
      nb_valid = (cyc < 64);
      nb_bit   = 1'(cyc % 3 == 0);
      td_ready = 1'b1;
      #1;
      if (td_valid && td_ready) begin
        check(td_bit == exp_q[0], "timed bit"); void'(exp_q.pop_front()); taken++;
      end
      if (nb_valid && nb_ready) begin acc ^= nb_bit; exp_q.push_back(acc); end
      cyc++;
    end
    nb_valid = 1'b0;
    check(cyc == 65, $sformatf("64 bits took %0d cycles, expected 65", cyc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
