// Self-checking testbench for htl_divider.
//
// For several bypass patterns (divide by 8, 7, 9, 14, 1, a scattered set
// and all bypassed) it runs the divider from reset and compares every
// phase output and the tick strobe, on every DCO cycle, with a reference
// worked out from the number of enabled stages N: in cycle j of a period
// (j = 0 after the reset edge) enabled stage k (k-th in chain order) is
// high for j <= k, the last enabled stage stays high, a bypassed stage
// copies the nearest enabled stage before it (low if none), tick is high
// for j = N-1, and the period is N cycles (1 for N <= 1).
module tb_htl_divider;
  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [13:0] bypass;
  logic [13:0] phase;
  logic        tick;
  int          checks = 0, failures = 0;
  int          ticks_seen;

  htl_divider dut (.clk(clk), .rst_n(rst_n), .bypass(bypass), .phase(phase), .tick(tick));

  always #125 clk = ~clk;

  initial begin
    #50us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [13:0] ref_phase(logic [13:0] byp, int j);
    logic [13:0] r;
    int n = 0, k = 0;
    logic prev = 1'b0;
    for (int i = 0; i < 14; i++) if (!byp[i]) n++;
    for (int i = 0; i < 14; i++) begin
      if (byp[i]) r[i] = prev;
      else begin
        r[i] = (k == n - 1) ? 1'b1 : (j <= k);
        k++;
      end
      prev = r[i];
    end
    return r;
  endfunction

  task automatic run_pattern(logic [13:0] byp, int cycles);
    int n = 0, per;
    for (int i = 0; i < 14; i++) if (!byp[i]) n++;
    per = (n <= 1) ? 1 : n;
    @(negedge clk);
    rst_n  = 1'b0;
    bypass = byp;
    @(negedge clk);
    rst_n = 1'b1;
    ticks_seen = 0;
    for (int c = 0; c < cycles; c++) begin
      int j = c % per;
      checks++;
      if (phase !== ref_phase(byp, j) || tick !== (j == per - 1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL byp=%b cycle %0d: phase=%b exp=%b tick=%b", byp, c, phase,
                   ref_phase(byp, j), tick);
      end
      if (tick) ticks_seen++;
      @(negedge clk);
    end
    checks++;
    if (ticks_seen != cycles / per) begin
      failures++;
      $display("FAIL byp=%b: %0d ticks in %0d cycles, expected %0d", byp, ticks_seen, cycles, cycles / per);
    end
  endtask

  initial begin
    rst_n  = 1'b1;
    bypass = '1;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    run_pattern(14'b11_1111_0000_0000, 80);   // divide by 8 (3993.6 MHz)
    run_pattern(14'b11_1111_1000_0000, 70);   // divide by 7 (3494.4 MHz)
    run_pattern(14'b11_1110_0000_0000, 90);   // divide by 9 (4492.8 MHz)
    run_pattern(14'b00_0000_0000_0000, 84);   // divide by 14
    run_pattern(14'b10_1010_0101_0110, 60);   // scattered, N = 7
    run_pattern(14'b11_1111_1111_1110, 10);   // N = 1
    run_pattern(14'b11_1111_1111_1111, 10);   // all bypassed
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
