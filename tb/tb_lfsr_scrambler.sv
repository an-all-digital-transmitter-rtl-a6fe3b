// Self-checking testbench for lfsr_scrambler.
//
// Reference: the sequence s[n] = s[n-14] xor s[n-15] computed from the
// initial state in an array, then the run-length rule (never more than L
// equal outputs in a row; an output that would make the run L+1 is
// inverted). Checks: the first output is the register's reset value and
// the following ones follow the reference; with the limiter off the
// sequence repeats after 2^15 - 1 steps and not before; with limits 3, 4
// and 5 no run exceeds the limit; with an all-ones start (a run of fifteen
// ones) and limit 3 the 4th and 8th bits are inverted; the output only
// moves on adv; a synchronous load (with adv also high) restarts the
// sequence from a new initial state.
module tb_lfsr_scrambler;
  import uwb_tx_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        adv;
  logic        load = 1'b0;
  logic [14:0] init;
  rll_mode_e   rll_mode;
  logic        bpsk;
  int          checks = 0, failures = 0;

  lfsr_scrambler dut (.*);

  always #1000 clk = ~clk;

  initial begin
    #500ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic restart(logic [14:0] i, rll_mode_e m);
    @(negedge clk);
    rst_n = 1'b0; init = i; rll_mode = m; adv = 1'b1;
    @(negedge clk);
    rst_n = 1'b1;
    check(bpsk == 1'b0, "first output is reset value");
  endtask

  task automatic run_ref(logic [14:0] i, rll_mode_e m, int n);
    bit s[$];
    bit prev;
    int run, lim, maxrun;
    lim = (m == RLL_3) ? 3 : (m == RLL_4) ? 4 : (m == RLL_5) ? 5 : 0;
    for (int k = 0; k < 15; k++) s.push_back(i[k]);
    restart(i, m);
    prev = 1'b0; run = 0; maxrun = 0;
    for (int k = 0; k < n; k++) begin
      bit o;
      if (k >= 15) s.push_back(s[k-14] ^ s[k-15]);
      o = s[k];
      if (lim != 0 && o == prev && run >= lim) o = ~o;
      run = (o == prev) ? run + 1 : 1;
      prev = o;
      if (run > maxrun) maxrun = run;
      @(negedge clk);
      check(bpsk == o, $sformatf("mode %0d bit %0d: got %0b exp %0b", m, k, bpsk, o));
    end
    if (lim != 0) check(maxrun <= lim, $sformatf("max run %0d above limit %0d", maxrun, lim));
  endtask

  initial begin
    bit seq[$];
    rst_n = 1'b1; #1 rst_n = 1'b0; adv = 1'b0; init = '0; rll_mode = RLL_OFF;
    // Standard start state s0 = s1 = 0, s2..s14 = 1.
    run_ref(15'b111_1111_1111_1100, RLL_OFF, 200);
    run_ref(15'b111_1111_1111_1100, RLL_3, 400);
    run_ref(15'b101_0011_1010_0110, RLL_4, 400);
    run_ref(15'b000_1111_0000_1001, RLL_5, 400);
    // All-ones start: limit 3 inverts the 4th and 8th bits.
    restart(15'h7fff, RLL_3);
    for (int k = 1; k <= 8; k++) begin
      @(negedge clk);
      check(bpsk == ((k % 4) != 0), $sformatf("RLL3 all-ones bit %0d = %0b", k, bpsk));
    end
    // Without limit: fifteen ones in a row.
    restart(15'h7fff, RLL_OFF);
    for (int k = 1; k <= 15; k++) begin
      @(negedge clk);
      check(bpsk == 1'b1, "run of fifteen ones without limit");
    end
    // Period of the maximal-length sequence.
    restart(15'b111_1111_1111_1100, RLL_OFF);
    for (int k = 0; k < 2 * 32767; k++) begin
      @(negedge clk);
      seq.push_back(bpsk);
    end
    begin
      automatic bit same = 1'b1;
      for (int k = 0; k < 32767; k++) if (seq[k] != seq[k + 32767]) same = 1'b0;
      check(same, "sequence repeats after 32767");
      same = 1'b1;
      for (int k = 0; k < 200; k++) if (seq[k] != seq[k + 16383]) same = 1'b0;
      check(!same, "sequence does not repeat after 16383");
    end
    // Hold when adv is low.
    @(negedge clk);
    adv = 1'b0;
    begin
      automatic logic b0 = bpsk;
      repeat (5) begin
        @(negedge clk);
        check(bpsk == b0, "holds without adv");
      end
    end
    // Synchronous load: init s0 = 1, s1 = 1, s2..s14 = 0, no limiting.
    rll_mode = RLL_OFF; init = 15'h0003; adv = 1'b1; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(bpsk == 1'b0, "load clears the output register");
    @(negedge clk); check(bpsk == 1'b1, "after load: s0");
    @(negedge clk); check(bpsk == 1'b1, "after load: s1");
    @(negedge clk); check(bpsk == 1'b0, "after load: s2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
