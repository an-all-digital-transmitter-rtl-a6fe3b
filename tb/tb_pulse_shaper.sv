// Self-checking testbench for pulse_shaper.
//
// Part 1 drives the phases of a divide-by-8 divider (stage k high for
// cycles j <= k of each 8-cycle period) with phi = stages 1, 2, 4, 5 and
// checks the windows cycle by cycle: S1 high for j = 2..5 (phi1 xor phi4),
// S3 for j = 3..4 (phi2 xor phi3), S2/S4 the same shifted by fir_delay
// cycles, everything low outside the burst. Part 2 drives random phases,
// selections, delays and burst gating and compares with a reference kept
// as a history of past windows. busy must be high while in_burst or any
// delayed copy is pending.
module tb_pulse_shaper;
  timeunit 1ps;
  timeprecision 1fs;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [13:0]     phase;
  logic            in_burst;
  logic [3:0][3:0] phi_sel;
  logic [2:0]      fir_delay;
  logic [3:0]      s;
  logic            busy;
  int              checks = 0, failures = 0;
  bit              hw[$], hn[$];   // history of gated windows, newest first

  pulse_shaper dut (.*);

  always #125 clk = ~clk;

  initial begin
    #100us;
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

  function automatic bit wide_ref();
    return in_burst & (phase[phi_sel[0]] ^ phase[phi_sel[3]]);
  endfunction
  function automatic bit narrow_ref();
    return in_burst & (phase[phi_sel[1]] ^ phase[phi_sel[2]]);
  endfunction

  // Compare at the middle of the cycle, then record this cycle's windows.
  task automatic compare_cycle();
    bit w = wide_ref(), n = narrow_ref();
    bit w_d = (fir_delay == 0) ? w : (hw.size() >= fir_delay ? hw[fir_delay-1] : 1'b0);
    bit n_d = (fir_delay == 0) ? n : (hn.size() >= fir_delay ? hn[fir_delay-1] : 1'b0);
    bit pend = 1'b0;
    for (int k = 0; k < 7 && k < hw.size(); k++) pend |= hw[k] | hn[k];
    check(s == {n_d, n, w_d, w}, $sformatf("s=%b exp=%b", s, {n_d, n, w_d, w}));
    check(busy == (in_burst | pend), "busy");
    hw.push_front(w);
    hn.push_front(n);
  endtask

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; phase = '1; in_burst = 1'b0; fir_delay = 0;
    phi_sel[0] = 1; phi_sel[1] = 2; phi_sel[2] = 4; phi_sel[3] = 5;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Part 1: divide-by-8 phases.
    for (int d = 0; d < 8; d++) begin
      fir_delay = 3'(d);
      for (int c = 0; c < 48; c++) begin
        automatic int j = c % 8;
        for (int k = 0; k < 14; k++) phase[k] = (k < 8) ? (j <= k || k == 7) : phase[7];
        in_burst = (c < 32);
        #1;
        compare_cycle();
        if (d == 2 && c < 32) begin
          check(s[0] == (j >= 2 && j <= 5), "S1 window j=2..5");
          check(s[2] == (j >= 3 && j <= 4), "S3 window j=3..4");
        end
        @(negedge clk);
      end
    end
    // Part 2: random stimulus.
    for (int c = 0; c < 3000; c++) begin
      if (c % 40 == 0) begin
        fir_delay = 3'($urandom_range(0, 7));
        for (int k = 0; k < 4; k++) phi_sel[k] = 4'($urandom_range(0, 13));
      end
      phase = 14'($urandom);
      in_burst = ($urandom_range(0, 3) != 0);
      #1;
      compare_cycle();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
