// Configuration shift register.
//
// Every programmable bit of the transmitter sits in one serial register of
// CFG_W bits. On each rising sclk edge the word shifts one place towards
// bit 0 and sdi enters at the top, so after CFG_W clocks the first bit sent
// sits at bit 0 (send bit 0 of tx_cfg_t first). sdo is bit 0, so several
// registers can be chained. A rising sclk edge with sload high copies the
// shifted word (after that edge's shift) into the shadow register whose
// value is the active configuration; shifting therefore never disturbs a
// running transmitter. rst_n low loads cfg_default() into both registers.
//
// Follows the description: all programmable bits come from one on-chip
// shift register. The serial protocol, the shadow copy and the reset
// configuration are this design's own choices.
module cfg_shift_reg
  import uwb_tx_pkg::*;
(
  input  logic    rst_n,
  input  logic    sclk,
  input  logic    sdi,
  input  logic    sload,
  output logic    sdo,
  output tx_cfg_t cfg
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [CFG_W-1:0] sr, sr_next;

  assign sr_next = {sdi, sr[CFG_W-1:1]};
  assign sdo     = sr[0];

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= cfg_default();
      cfg <= cfg_default();
    end else begin
      sr <= sr_next;
      if (sload) cfg <= tx_cfg_t'(sr_next);
    end
  end

endmodule
