// Self-checking testbench for cfg_shift_reg.
//
// Checks that reset gives the default configuration, that shifting
// without sload leaves the active configuration alone, that after shifting
// a random word bit 0 first and pulsing sload the active configuration is
// that word, that sdo replays the shifted bits CFG_W clocks later, and
// that single fields land in the right place (E/L Count, the last slice's
// multiplexer select and the bypass bits).
module tb_cfg_shift_reg;
  import uwb_tx_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic    rst_n, sclk, sdi, sload, sdo;
  tx_cfg_t cfg;
  int      checks = 0, failures = 0;

  cfg_shift_reg dut (.*);

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
      $display("FAIL %s", what);
    end
  endtask

  task automatic clk_bit(bit d, bit ld);
    sdi = d; sload = ld;
    #50 sclk = 1'b1;
    #50 sclk = 1'b0;
  endtask

  task automatic shift_word(logic [CFG_W-1:0] w);
    for (int i = 0; i < int'(CFG_W); i++) clk_bit(w[i], i == int'(CFG_W) - 1);
    sload = 1'b0;
  endtask

  initial begin
    logic [CFG_W-1:0] w, w2;
    tx_cfg_t c;
    sclk = 0; sdi = 0; sload = 0; rst_n = 1; #1 rst_n = 0;
    #100 rst_n = 1;
    check(cfg == cfg_default(), "reset configuration");
    check(cfg.n_pulses == 5'd16 && cfg.el_count == 5'd16 && cfg.div_bypass == 14'h3f00,
          "default fields");
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < int'(CFG_W); i += 32) w[i +: 32] = $urandom;
      for (int i = 0; i < int'(CFG_W) - 1; i++) clk_bit(w[i], 1'b0);
      check(cfg == (r == 0 ? cfg_default() : tx_cfg_t'(w2)), "no update while shifting");
      clk_bit(w[CFG_W-1], 1'b1);
      sload = 1'b0;
      check(cfg == tx_cfg_t'(w), $sformatf("word %0d loaded", r));
      // sdo: the word comes out bit 0 first while the next word goes in.
      for (int i = 0; i < 8; i++) begin
        check(sdo == w[i], "sdo replays bit");
        clk_bit(1'b0, 1'b0);
      end
      w2 = w;
      shift_word(w);
    end
    c = cfg_default();
    c.el_count = 5'd7;
    c.pa_sel[29] = PA_S3;
    c.div_bypass = 14'b11_1111_1000_0000;
    shift_word(c);
    check(cfg.el_count == 5'd7 && cfg.pa_sel[29] == PA_S3 && cfg.div_bypass == 14'h3f80,
          "fields land in place");
    check(cfg.rll_mode == RLL_OFF && cfg.n_pulses == 5'd16, "other fields kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
