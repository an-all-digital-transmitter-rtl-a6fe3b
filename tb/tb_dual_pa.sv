// Self-checking testbench for the dual_pa behavioural model.
//
// Random activation patterns, PA enables, oscillator levels and BPSK bits
// are applied with the common-mode devices off; for each, the number of
// slices pulling each node up or down must equal the number of enabled
// active slices, in the direction of the inverted (BPSK-multiplexed)
// oscillator, and node C must be the signed sum. Flipping BPSK must flip
// the sign of node C. With no slice active the idle devices are reported
// as given, and the two nodes are undriven.
module tb_dual_pa;
  import uwb_tx_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic              osc, bpsk;
  logic [29:0]       act;
  logic [1:0]        pa_en;
  logic              a_pchg_n, a_pdis, b_pchg_n, b_pdis;
  pa_node_t          node_a, node_b;
  logic signed [7:0] node_c;
  int                checks = 0, failures = 0;

  dual_pa dut (.*);

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
    a_pchg_n = 1'b1; a_pdis = 1'b0; b_pchg_n = 1'b1; b_pdis = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int na, nb, c;
      bit up;
      act = 30'($urandom); pa_en = 2'($urandom); osc = 1'($urandom); bpsk = 1'($urandom);
      if (t % 7 == 0) act = '0;
      if (t % 5 == 0) pa_en = 2'b11;
      #10;
      na = pa_en[1] ? $countones(act) : 0;
      nb = pa_en[0] ? $countones(act) : 0;
      up = (osc == bpsk);       // slice output = not (osc xor bpsk)
      check(node_a.n_up == (up ? na : 0) && node_a.n_dn == (up ? 0 : na), "node A drive");
      check(node_b.n_up == (up ? nb : 0) && node_b.n_dn == (up ? 0 : nb), "node B drive");
      c = up ? na + nb : -(na + nb);
      check(int'(node_c) == c, $sformatf("node C %0d exp %0d", node_c, c));
      bpsk = ~bpsk;
      #10;
      check(int'(node_c) == -c, "BPSK flips node C");
    end
    // Idle: devices on, nothing driven.
    act = '0; pa_en = 2'b11; a_pchg_n = 1'b0; b_pdis = 1'b1;
    #10;
    check(node_a.pchg && !node_a.pdis && node_a.n_up == 0 && node_a.n_dn == 0, "A idles pre-charged");
    check(node_b.pdis && !node_b.pchg && node_b.n_up == 0 && node_b.n_dn == 0, "B idles pre-discharged");
    check(node_c == 0, "no RF while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
