// Self-checking testbench for the dco behavioural model.
//
// Measures the oscillation period for a set of codes and compares it with
// the straight-line law F_MIN + code * (F_MAX - F_MIN) / 767 (in MHz),
// where code = (3 - caps) * 192 + 3 * strength + extra1 + extra2. Also
// checks that the output is high and still while disabled, that the first
// edge comes START_DELAY_PS after enable, that raising the code raises the
// frequency, and the end points of the 2.2-6.0 GHz range.
module tb_dco;
  timeunit 1ps;
  timeprecision 1fs;

  logic       en;
  logic [5:0] strength;
  logic       extra1, extra2;
  logic [2:0] cap_therm;
  logic       osc;
  int         checks = 0, failures = 0;

  dco dut (.*);

  initial begin
    #10us;
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

  // Returns the measured period in fs over 8 cycles.
  task automatic measure(input logic [2:0] c, input int st, input bit e1, input bit e2,
                         output real period_fs);
    realtime t0, t1;
    en = 1'b0; cap_therm = c; strength = 6'(st); extra1 = e1; extra2 = e2;
    #3000;
    check(osc == 1'b1, "output high while disabled");
    en = 1'b1;
    t0 = $realtime;
    @(negedge osc);
    check(($realtime - t0) > 1999.0 && ($realtime - t0) < 2001.0,
          $sformatf("start-up delay %0.1f ps", $realtime - t0));
    @(negedge osc);
    t0 = $realtime;
    repeat (8) @(negedge osc);
    t1 = $realtime;
    period_fs = (t1 - t0) * 1000.0 / 8.0;
    en = 1'b0;
  endtask

  function automatic real expected_fs(int caps, int st, int e1, int e2);
    int code = (3 - caps) * 192 + 3 * st + e1 + e2;
    real f = 2200.0 + real'(code) * 3800.0 / 767.0;
    return 1.0e9 / f;
  endfunction

  initial begin
    real p, prev;
    int  caps;
    logic [2:0] therm [4] = '{3'b111, 3'b011, 3'b001, 3'b000};
    en = 1'b0; strength = '0; extra1 = 0; extra2 = 0; cap_therm = '1;
    prev = 1.0e12;
    for (int r = 0; r < 4; r++)
      foreach (therm[i]) if (i == r) begin
        for (int st = 0; st < 64; st += 21) begin
          caps = 3 - r;
          measure(therm[i], st, 0, 0, p);
          check(p > expected_fs(caps, st, 0, 0) - 10.0 && p < expected_fs(caps, st, 0, 0) + 10.0,
                $sformatf("caps=%0d st=%0d period %0.1f fs exp %0.1f", caps, st, p, expected_fs(caps, st, 0, 0)));
          check(p < prev, "frequency rises with code");
          prev = p;
        end
      end
    measure(3'b011, 10, 1, 0, p);
    check(p > expected_fs(2, 10, 1, 0) - 10.0 && p < expected_fs(2, 10, 1, 0) + 10.0, "extra1 step");
    measure(3'b011, 10, 1, 1, p);
    check(p > expected_fs(2, 10, 1, 1) - 10.0 && p < expected_fs(2, 10, 1, 1) + 10.0, "extra2 step");
    measure(3'b111, 0, 0, 0, p);
    check(p > 454000.0 && p < 455000.0, "2.2 GHz at the lowest code");
    measure(3'b000, 63, 1, 1, p);
    check(p > 166600.0 && p < 166700.0, "6.0 GHz at the highest code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
