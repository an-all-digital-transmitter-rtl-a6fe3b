// Self-checking testbench for pa_drive_network.
//
// Random shaping signals, busy, per-slice selections and idle levels are
// applied; each activation line must equal the selected shaping signal (or
// 0 for the grounded input), and the pre-charge / pre-discharge controls
// must follow the idle levels while busy is low and all be off while busy
// is high. A fixed case checks the envelope weights: with 6/6/9/9 slices
// on S1..S4 the number of active lines is the sum of the weights of the
// signals that are high.
module tb_pa_drive_network;
  import uwb_tx_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic [3:0]     s;
  logic           busy;
  pa_sel_e [29:0] pa_sel;
  logic           cm_a_high, cm_b_high;
  logic [29:0]    act;
  logic           a_pchg_n, a_pdis, b_pchg_n, b_pdis;
  int             checks = 0, failures = 0;

  pa_drive_network dut (.*);

  initial begin
    #1ms;
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

  initial begin
    for (int t = 0; t < 2000; t++) begin
      s = 4'($urandom); busy = 1'($urandom); cm_a_high = 1'($urandom); cm_b_high = 1'($urandom);
      for (int i = 0; i < 30; i++) pa_sel[i] = pa_sel_e'(3'($urandom_range(0, 4)));
      #10;
      for (int i = 0; i < 30; i++) begin
        automatic bit e = (pa_sel[i] == PA_OFF) ? 1'b0 : s[int'(pa_sel[i]) - 1];
        check(act[i] == e, $sformatf("slice %0d sel %0d s=%b act=%b e=%b", i, pa_sel[i], s, act[i], e));
      end
      check(a_pchg_n == !(!busy && cm_a_high), "A pre-charge");
      check(a_pdis   == (!busy && !cm_a_high), "A pre-discharge");
      check(b_pchg_n == !(!busy && cm_b_high), "B pre-charge");
      check(b_pdis   == (!busy && !cm_b_high), "B pre-discharge");
    end
    for (int i = 0; i < 30; i++)
      pa_sel[i] = (i < 6) ? PA_S1 : (i < 12) ? PA_S2 : (i < 21) ? PA_S3 : PA_S4;
    busy = 1'b1;
    for (int v = 0; v < 16; v++) begin
      s = 4'(v);
      #10;
      check($countones(act) == 6 * v[0] + 6 * v[1] + 9 * v[2] + 9 * v[3],
            $sformatf("weights for S=%b: %0d active", s, $countones(act)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
