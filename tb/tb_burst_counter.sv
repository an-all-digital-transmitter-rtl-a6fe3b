// Self-checking testbench for burst_counter.
//
// A DCO-like clock runs only while tx_en is high (as in the transmitter)
// and a tick is generated every DIV cycles. Each scenario raises Start-TX,
// lowers it after a chosen number of pulse periods and checks, against
// values worked out from the counts alone: the pulses sent (periods with
// in_burst), the cycle at which Shut-down clears tx_en, the counter value
// sequence, Pre-Early, and the Early/Late decision (early when Start-TX
// falls after E/L Count periods have completed, late when before).
module tb_burst_counter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int DIV = 8;

  logic       clk = 1'b1;
  logic       tick;
  logic       rst_n;
  logic       start_tx;
  logic [4:0] n_pulses, el_count, shutdown_count;
  logic       tx_en, in_burst, pre_early, shutdown, early_late;
  logic [4:0] count;
  int         checks = 0, failures = 0;
  int         phase_cnt = 0;
  int         pulses, periods_on;

  burst_counter dut (.*);

  // Gated clock: 250 ps period while the transmitter is enabled.
  always begin
    wait (tx_en);
    #500;
    while (tx_en) begin
      clk = ~clk;
      #125;
    end
    clk = 1'b1;
  end

  // Tick generator standing in for the divider (reset with tx_en).
  always_ff @(posedge clk or negedge tx_en)
    if (!tx_en) phase_cnt <= 0;
    else        phase_cnt <= (phase_cnt == DIV - 1) ? 0 : phase_cnt + 1;
  assign tick = (phase_cnt == DIV - 1);

  // Monitors: count pulse periods and enabled periods.
  always @(posedge clk) if (tx_en && tick) begin
    periods_on++;
    if (in_burst) pulses++;
  end

  initial begin
    #20us;
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

  // fall_after: Start-TX falls this long after it rose (in ps).
  task automatic burst(int np, int el, int sd, int fall_after_ps, bit exp_early);
    n_pulses = 5'(np); el_count = 5'(el); shutdown_count = 5'(sd);
    pulses = 0; periods_on = 0;
    #1000;
    start_tx = 1'b1;
    #1;
    check(tx_en == 1'b1, "tx_en set by Start-TX edge");
    #(fall_after_ps - 1);
    start_tx = 1'b0;
    wait (!tx_en);
    #10;
    check(early_late == exp_early, $sformatf("early/late np=%0d el=%0d fall=%0d got %0b", np, el, fall_after_ps, early_late));
    check(pulses == ((np < sd + 1) ? np : sd + 1), $sformatf("pulses %0d expected %0d", pulses, np));
    // Shut-down one DCO cycle after count reaches shutdown_count: sd full periods.
    check(periods_on == sd, $sformatf("periods before shutdown %0d expected %0d", periods_on, sd));
    check(count == 0 && !pre_early && !shutdown, "state reset after shutdown");
  endtask

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; start_tx = 1'b0;
    n_pulses = 16; el_count = 16; shutdown_count = 20;
    #1000 rst_n = 1'b1;
    // DIV=8, 250 ps: period 2 ns, plus 500 ps start-up delay.
    // E/L Count 16 reached at 0.5 + 32 ns.
    burst(16, 16, 20, 36000, 1'b1);   // reference falls late  -> DCO early
    burst(16, 16, 20, 30000, 1'b0);   // reference falls early -> DCO late
    burst(5, 6, 9, 16000, 1'b1);      // values of the timing diagram
    burst(1, 2, 3, 3000, 1'b0);       // single pulse
    burst(2, 3, 12, 5000, 1'b0);
    // Count sequence and Pre-Early timing within one burst.
    n_pulses = 4; el_count = 3; shutdown_count = 6;
    #1000 start_tx = 1'b1;
    for (int k = 0; k < 6; k++) begin
      @(posedge clk iff tick);
      #1;
      check(count == 5'(k + 1), $sformatf("count %0d after tick %0d", count, k + 1));
      check(in_burst == (k + 1 < 4), "in_burst window");
      if (k + 1 == 3) begin
        @(posedge clk); #1;
        check(pre_early, "Pre-Early latched at E/L Count");
      end
    end
    #20000 start_tx = 1'b0;
    #1000;
    check(!tx_en, "shut down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
