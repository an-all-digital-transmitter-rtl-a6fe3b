// Self-checking testbench for fll_sar.
//
// The loop is closed through a simple plant model: an ideal oscillator whose
// time for 16 pulse periods is (16 * 8) / f(code) with f(code) = 2200 +
// code * 3800/767 MHz (codes above 767 act as 767), and an early/late flop
// that, on each falling Start-TX edge, reports early if that time was
// shorter than the Start-TX high time. For several reference high times
// (the three 802.15.4a low-band channels at divide ratios 7, 8 and 9, plus
// two others), the final code must be the largest code that is late (the
// one-code accuracy the search promises), Start-TX must be high one and
// low one reference cycle per decision, and done must come after exactly
// 10 decisions (20 reference cycles).
module tb_fll_sar;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       cal_start;
  logic       early_late;
  logic       start_tx;
  logic [9:0] tune;
  logic       busy, done;
  int         checks = 0, failures = 0;
  real        t_ref_ps;      // Start-TX high time for the current case
  int         div;           // divide ratio for the current case
  int         highs, cyc;

  fll_sar dut (.*);

  always #16026 clk = ~clk;  // 31.2 MHz

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real t16_ps(int code);
    int c = (code > 767) ? 767 : code;
    real f = 2200.0 + real'(c) * 3800.0 / 767.0;
    return 16.0 * real'(div) * 1.0e6 / f;
  endfunction

  always @(negedge start_tx or negedge rst_n)
    if (!rst_n) early_late <= 1'b0;
    else        early_late <= (t16_ps(int'(tune)) < t_ref_ps);

  always @(posedge clk) begin
    if (busy) cyc++;
    if (start_tx) highs++;
  end

  task automatic calibrate(int d, real f_target_mhz);
    int best;
    div = d;
    // Start-TX high time: 16*div cycles at the target frequency.
    t_ref_ps = 16.0 * real'(div) * 1.0e6 / f_target_mhz;
    highs = 0; cyc = 0;
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    wait (done);
    best = -1;
    for (int c = 0; c < 1024; c++) if (!(t16_ps(c) < t_ref_ps)) best = c;
    check(int'(tune) == best || (best == -1 && tune == 0),
          $sformatf("div %0d target %0.1f MHz: code %0d, expected %0d", d, f_target_mhz, tune, best));
    check(highs == 10, $sformatf("%0d Start-TX pulses, expected 10", highs));
    check(cyc == 20, $sformatf("%0d cycles busy, expected 20", cyc));
    check(!busy, "idle after calibration");
  endtask

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; cal_start = 1'b0; div = 8; t_ref_ps = 32052.0;
    #50000 rst_n = 1'b1;
    check(tune == 10'd512 && !busy && !done, "reset state");
    calibrate(7, 3494.4);
    calibrate(8, 3993.6);
    calibrate(9, 4492.8);
    calibrate(8, 2500.0);
    calibrate(8, 5871.3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
