// End-to-end testbench of uwb_tx_top at its default sizes.
//
// Sequence: reset; program the configuration serially; calibrate the DCO
// against 15.6 MHz Start-TX symbols; then send bursts in several settings:
// 16-pulse bursts at 15.6 MHz on the 3993.6 MHz channel (divide by 8), a
// single pulse, 5-pulse bursts, the 3494.4 and 4492.8 MHz channels (divide
// by 7 and 9, each calibrated first), bursts 10 us apart (100 kHz symbol
// rate), run-length limit 3 from an all-ones start, reduced gain, one PA
// only, and the capacitive-combining test mode.
//
// Every pulse is observed at node C on each DCO rising edge. Checks,
// worked out from the configuration alone:
//  - the number of pulses per burst and of pulse periods before shut-down;
//  - the DCO cycles per pulse period (the divide ratio);
//  - the envelope levels: every |node C| value during a pulse must be a
//    sum of the slice weights of shaping signals that can be on together;
//  - the BPSK sign of every pulse against a reference LFSR
//    (s[n] = s[n-14] xor s[n-15]) with the run-length rule, the first
//    pulse after a reload using the reset value 0;
//  - idle common mode: node A pre-charged and node B pre-discharged (or
//    as programmed) whenever no pulse is being shaped;
//  - the calibrated DCO frequency against a brute-force search over the
//    DCO model's codes.
// Mechanisms counted (each must occur): calibration, early and late
// decisions, shut-down, RLL inversions, pulses with all four shaping
// signals on, divider ratios
// 7/8/9, gain reduction, single-PA mode, combining test mode.
module tb_uwb_tx_top;
  import uwb_tx_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic                 rst_n, start_tx, ref_clk, cal_start, sclk, sdi, sload;
  logic                 sdo, cal_busy, cal_done, early_late, osc, tx_en, bpsk;
  logic                 in_burst, pre_early, shutdown;
  logic [4:0]           count;
  logic [9:0]           tune;
  logic [29:0]          act;
  pa_node_t             pa_a, pa_b;
  logic signed [7:0]    pa_c;

  uwb_tx_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cal = 0, n_early = 0, n_late = 0, n_shutdown = 0, n_rll_inv = 0;
  int n_four_level = 0, n_div7 = 0, n_div8 = 0, n_div9 = 0, n_low_gain = 0;
  int n_single_pa = 0, n_cm_test = 0, n_slow_srf = 0;

  tx_cfg_t cfg;
  bit      ref_seq[$];      // expected BPSK bit per pulse since the last reload
  bit      raw_seq[$];      // the LFSR bits without run-length limiting
  int      pulse_idx = -1;  // pulse being observed (-1: none), counted from the last reload
  int      pulse_base = 0;  // pulses of earlier bursts since the last reload
  bit      mon_on = 1'b0;   // observe pulses (only inside burst())

  // per-burst observation
  int      burst_pulses, burst_periods, burst_cycles;
  int      lv_seen[int];    // |node C| values seen in the current pulse
  bit      cur_sign_ok = 1'b1;
  bit      all_four;         // all four shaping signals on at once
  int      last_count;

  always #16026 ref_clk = ~ref_clk;   // 31.2 MHz

  initial begin
    #300us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- configuration ----------------
  task automatic write_cfg(tx_cfg_t c);
    logic [CFG_W-1:0] w = c;
    for (int i = 0; i < int'(CFG_W); i++) begin
      sdi = w[i]; sload = (i == int'(CFG_W) - 1);
      #5000 sclk = 1'b1;
      #5000 sclk = 1'b0;
    end
    sload = 1'b0;
    cfg = c;
    build_ref(c, 200);
  endtask

  task automatic build_ref(tx_cfg_t c, int n);
    bit s[$];
    bit prev = 1'b0;
    int run = 0;
    int lim = (c.rll_mode == RLL_3) ? 3 : (c.rll_mode == RLL_4) ? 4 : (c.rll_mode == RLL_5) ? 5 : 0;
    ref_seq.delete(); raw_seq.delete();
    ref_seq.push_back(1'b0);          // reset value of the output register
    raw_seq.push_back(1'b0);
    for (int k = 0; k < n; k++) begin
      bit o;
      if (k < 15) s.push_back(c.lfsr_init[k]);
      else        s.push_back(s[k-14] ^ s[k-15]);
      o = s[k];
      raw_seq.push_back(o);
      if (lim != 0 && o == prev && run >= lim) o = ~o;
      run = (o == prev) ? run + 1 : 1;
      prev = o;
      ref_seq.push_back(o);
    end
    pulse_idx = -1;
    pulse_base = 0;
  endtask

  // ---------------- pulse monitor ----------------
  // Everything is sampled 20 ps after each DCO rising edge, when the
  // registers have settled. The pulse index is the burst counter value
  // plus the pulses of earlier bursts since the last reload, because the
  // scrambler advances once per pulse period inside the burst.
  always @(posedge osc) begin
    #20;
    if (mon_on && tx_en) begin
      automatic int idx = pulse_base + int'(count);
      burst_cycles++;
      if (int'(count) > burst_periods) burst_periods = int'(count);
      if (in_burst) begin
        automatic int mag = (pa_c < 0) ? -int'(pa_c) : int'(pa_c);
        if (idx != pulse_idx) begin
          if (pulse_idx >= 0) close_pulse();
          pulse_idx = idx;
        end
        if (dut.s == 4'b1111) all_four = 1'b1;
        if (mag != 0) begin
          lv_seen[mag] = 1;
          // osc is high here: node C > 0 exactly when bpsk = 1
          if ((pa_c > 0) != ref_seq[pulse_idx]) cur_sign_ok = 1'b0;
        end
      end
    end
  end

  // Expected envelope levels for the programmed weights and FIR order.
  function automatic bit levels_ok(int seen[int], tx_cfg_t c);
    int w[4] = '{0, 0, 0, 0};
    int sums[int];
    int gain = (c.pa_en[1] ? 1 : 0) + (c.pa_en[0] ? 1 : 0);
    for (int i = 0; i < 30; i++) if (c.pa_sel[i] != PA_OFF) w[int'(c.pa_sel[i]) - 1]++;
    // any subset of the four signals may be on at once
    for (int m = 1; m < 16; m++) begin
      int sum = 0;
      for (int k = 0; k < 4; k++) if (m[k]) sum += w[k];
      sums[sum * gain] = 1;
    end
    foreach (seen[v]) if (!sums.exists(v)) return 1'b0;
    return 1'b1;
  endfunction

  task automatic close_pulse();
    check(cur_sign_ok, $sformatf("BPSK sign of pulse %0d (expected %0b)", pulse_idx, ref_seq[pulse_idx]));
    check(lv_seen.num() > 0, $sformatf("pulse %0d has RF", pulse_idx));
    check(levels_ok(lv_seen, cfg), $sformatf("pulse %0d envelope levels", pulse_idx));
    if (all_four) n_four_level++;
    if (ref_seq[pulse_idx] != raw_seq[pulse_idx]) n_rll_inv++;
    burst_pulses++;
    lv_seen.delete();
    cur_sign_ok = 1'b1;
    all_four = 1'b0;
  endtask

  // Idle common-mode levels: checked continuously while not shaping.
  always @(posedge ref_clk or posedge sclk) begin
    if (!tx_en && rst_n) begin
      check(pa_a.pchg == cfg.cm_a_high && pa_a.pdis == !cfg.cm_a_high, "node A idle level");
      check(pa_b.pchg == cfg.cm_b_high && pa_b.pdis == !cfg.cm_b_high, "node B idle level");
      check(pa_c == 0, "no RF while idle");
    end
  end

  always @(posedge shutdown) n_shutdown++;

  // ---------------- bursts ----------------
  // One symbol at 15.6 MHz: Start-TX high for high_cycles reference cycles.
  task automatic burst(int high_cycles, int low_cycles);
    int n_div = 0;
    for (int i = 0; i < 14; i++) if (!cfg.div_bypass[i]) n_div++;
    burst_pulses = 0; burst_periods = 0; burst_cycles = 0;
    lv_seen.delete(); cur_sign_ok = 1'b1; all_four = 1'b0;
    pulse_idx = -1;
    mon_on = 1'b1;
    @(posedge ref_clk) start_tx = 1'b1;
    repeat (high_cycles) @(posedge ref_clk);
    start_tx = 1'b0;
    wait (!tx_en);
    mon_on = 1'b0;
    if (pulse_idx >= 0) close_pulse();
    pulse_idx = -1;
    pulse_base += burst_pulses;
    repeat (low_cycles) @(posedge ref_clk);
    if (early_late) n_early++; else n_late++;
    check(burst_pulses == int'(cfg.n_pulses), $sformatf("%0d pulses, expected %0d", burst_pulses, cfg.n_pulses));
    check(burst_periods == int'(cfg.shutdown_count),
          $sformatf("%0d periods before shut-down, expected %0d", burst_periods, cfg.shutdown_count));
    // DCO cycles while enabled: shutdown_count periods of n_div cycles,
    // plus the cycle that registers Shut-down.
    check(burst_cycles >= int'(cfg.shutdown_count) * n_div && burst_cycles <= int'(cfg.shutdown_count) * n_div + 1,
          $sformatf("%0d DCO cycles in burst, expected %0d periods of %0d", burst_cycles, cfg.shutdown_count, n_div));
    if (n_div == 7) n_div7++;
    if (n_div == 8) n_div8++;
    if (n_div == 9) n_div9++;
  endtask

  // DCO frequency in MHz, measured over 64 cycles of a burst.
  task automatic measure_dco(output real f_mhz);
    realtime t0, t1;
    fork
      begin
        @(posedge ref_clk) start_tx = 1'b1;
        repeat (2) @(posedge ref_clk);
        start_tx = 1'b0;
      end
      begin
        wait (tx_en);
        repeat (4) @(posedge osc);
        t0 = $realtime;
        repeat (64) @(posedge osc);
        t1 = $realtime;
      end
    join
    wait (!tx_en);
    repeat (2) @(posedge ref_clk);
    f_mhz = 64.0e6 / (t1 - t0);
  endtask

  // Successive-approximation calibration with the present configuration
  // (n_div latches, E/L Count 15), then a check of the code against a
  // search over the model's law and of the frequency against the channel.
  // Reference: the fastest code whose Pre-Early arrives after Start-TX
  // falls (high time 32.052 ns). The first DCO rising edge comes half a
  // period after the start-up delay; count reaches 15 on rising edge
  // 15 * n_div and Pre-Early registers on the next one.
  task automatic calibrate(int n_div, real target_mhz);
    real f;
    int  best = -1;
    @(posedge ref_clk) cal_start = 1'b1;
    @(posedge ref_clk) cal_start = 1'b0;
    wait (cal_done);
    n_cal++;
    for (int k = 0; k < 1024; k++)
      if (2000.0 + (15.0 * real'(n_div) + 0.5) * model_period_ps(k) >= 32052.0) best = k;
    check(int'(tune) >= best - 1 && int'(tune) <= best + 1,
          $sformatf("calibrated code %0d, reference %0d", tune, best));
    measure_dco(f);
    $display("calibrated DCO for divide by %0d: code %0d, %0.1f MHz (channel %0.1f MHz)", n_div, tune, f, target_mhz);
    check(f > target_mhz * 0.99 && f < target_mhz * 1.01, $sformatf("DCO at %0.1f MHz", f));
    @(posedge sclk or posedge ref_clk);
    write_cfg(cfg);               // measure_dco sent pulses: reload the scrambler
  endtask

  // Model of the DCO's law, for the reference code search.
  function automatic real model_period_ps(int code);
    int c = (code > 767) ? 767 : code;
    return 1.0e6 / (2200.0 + real'(c) * 3800.0 / 767.0);
  endfunction

  initial begin
    tx_cfg_t c;
    ref_clk = 1'b0; start_tx = 1'b0; cal_start = 1'b0; sclk = 1'b0; sdi = 1'b0; sload = 1'b0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #100000 rst_n = 1'b1;
    cfg = cfg_default();
    check(dut.cfg == cfg_default(), "default configuration after reset");

    // E/L Count 15: the 2 ns DCO start-up is about one pulse period.
    c = cfg_default();
    c.el_count = 5'd15;
    write_cfg(c);
    check(dut.cfg == c, "configuration shifted in");

    // ---- calibration on the 3993.6 MHz channel ----
    calibrate(8, 3993.6);

    // ---- early and late decisions at the calibrated code ----
    // (Start-TX must fall before Shut-down Count, so the reference length
    // stays one symbol and E/L Count is moved instead.)
    burst(1, 1);                  // E/L Count 15: one of the two, near lock
    c = cfg; c.el_count = 5'd10; write_cfg(c);
    burst(1, 1);                  // count 10 reached well before 32 ns: early
    check(early_late == 1'b1, "low E/L Count: early");
    c = cfg; c.el_count = 5'd20; c.shutdown_count = 5'd24; write_cfg(c);
    burst(1, 1);                  // count 20 not reached in 32 ns: late
    check(early_late == 1'b0, "high E/L Count: late");

    // ---- 16-pulse bursts at 15.6 MHz ----
    c = cfg; c.el_count = 5'd15; c.shutdown_count = 5'd20; write_cfg(c);
    repeat (4) burst(1, 1);

    // ---- single pulse and 5-pulse bursts ----
    c = cfg; c.n_pulses = 5'd1; c.shutdown_count = 5'd3; c.el_count = 5'd2; write_cfg(c);
    repeat (3) burst(1, 1);
    c = cfg; c.n_pulses = 5'd5; c.shutdown_count = 5'd9; c.el_count = 5'd6; write_cfg(c);
    repeat (3) burst(1, 1);

    // ---- other channels: divide by 7 and 9, each calibrated ----
    // Shut-down Count 24: at divide by 7 a 20-period burst would end
    // before the 32 ns reference edge and every decision would read late.
    c = cfg; c.n_pulses = 5'd16; c.shutdown_count = 5'd24; c.el_count = 5'd15;
    c.div_bypass = 14'b11_1111_1000_0000;     // 7 latches
    c.phi_sel[0] = 4'd1; c.phi_sel[1] = 4'd2; c.phi_sel[2] = 4'd3; c.phi_sel[3] = 4'd4;
    write_cfg(c);
    calibrate(7, 3494.4);
    repeat (2) burst(1, 1);
    c.div_bypass = 14'b11_1110_0000_0000;     // 9 latches
    c.phi_sel[0] = 4'd1; c.phi_sel[1] = 4'd3; c.phi_sel[2] = 4'd4; c.phi_sel[3] = 4'd6;
    write_cfg(c);
    calibrate(9, 4492.8);
    repeat (2) burst(1, 1);
    c = cfg_default(); c.el_count = 5'd15;
    write_cfg(c);
    calibrate(8, 3993.6);

    // ---- 100 kHz symbol rate: bursts 10 us apart ----
    repeat (2) burst(1, 311);
    n_slow_srf++;

    // ---- run-length limit 3 from an all-ones start ----
    c = cfg_default(); c.el_count = 5'd15;
    c.lfsr_init = 15'h7fff; c.rll_mode = RLL_3;
    write_cfg(c);
    burst(1, 1);
    begin
      // the first burst carries the forced inversions of the ones run
      int runmax = 0, run = 0;
      for (int k = 1; k <= 16; k++) begin
        run = (k > 1 && ref_seq[k] == ref_seq[k-1]) ? run + 1 : 1;
        if (run > runmax) runmax = run;
      end
      check(runmax <= 3, "no run above 3 in the burst");
    end
    burst(1, 1);

    // ---- gain control: only 12 slices on ----
    c = cfg_default(); c.el_count = 5'd15;
    for (int i = 0; i < 30; i++) c.pa_sel[i] = (i < 3) ? PA_S1 : (i < 6) ? PA_S2 : (i < 9) ? PA_S3 : (i < 12) ? PA_S4 : PA_OFF;
    write_cfg(c);
    burst(1, 1);
    n_low_gain++;

    // ---- one PA only ----
    c = cfg_default(); c.el_count = 5'd15; c.pa_en = 2'b10;
    write_cfg(c);
    burst(1, 1);
    n_single_pa++;

    // ---- combining disabled: both nodes idle high ----
    c = cfg_default(); c.el_count = 5'd15; c.cm_b_high = 1'b1;
    write_cfg(c);
    burst(1, 1);
    n_cm_test++;
    repeat (3) @(posedge ref_clk);

    // ---- every mechanism must have happened ----
    check(n_cal > 0, "calibration ran");
    check(n_early > 0, "early decision seen");
    check(n_late > 0, "late decision seen");
    check(n_shutdown > 0, "shut-down seen");
    check(n_rll_inv > 0, "run-length inversion seen");
    check(n_four_level > 0, "four-level pulse seen");
    check(n_div7 > 0 && n_div8 > 0 && n_div9 > 0, "divide by 7, 8 and 9 used");
    check(n_low_gain > 0 && n_single_pa > 0 && n_cm_test > 0, "gain, single PA, combining test");
    check(n_cal >= 4 && n_slow_srf > 0, "calibration on three channels, 100 kHz bursts");
    $display("mechanisms: cal=%0d early=%0d late=%0d shutdown=%0d rll_inv=%0d four_level=%0d div7=%0d div8=%0d div9=%0d",
             n_cal, n_early, n_late, n_shutdown, n_rll_inv, n_four_level, n_div7, n_div8, n_div9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
