// Burst timing, shut-down and early/late detection.
//
// A rising edge of Start-TX raises tx_en, which turns the DCO on and
// releases the reset of every block clocked by it. A 5-bit synchronous
// counter then counts divider periods (one per tick): count = k during the
// (k+1)-th pulse period. A pulse is sent in every period with
// count < n_pulses. When count equals el_count, Pre-Early latches high.
// While count equals shutdown_count, Shut-down is asserted; the next DCO
// edge ends the burst: tx_en falls, which stops the DCO and resets the
// other blocks, and the counter and Pre-Early return to zero on that same
// edge. The falling edge of Start-TX clocks Pre-Early into the Early/Late
// flop: 1 means the DCO reached E/L Count before the reference edge (DCO
// early, too fast), 0 means late.
//
// tx_en is the XOR of two toggle flops: start_tgl, clocked by Start-TX and
// toggled only while idle, and stop_tgl, clocked by the DCO, which copies
// start_tgl at the end of a burst. Only one of them changes at a time, so
// tx_en does not glitch, and every flop here has the chip reset as its
// only asynchronous control (the state is known after reset whatever it
// was at power-up). A rising Start-TX edge during a burst is ignored.
//
// Interface: clk is the DCO output, tick the divider's period strobe,
// start_tx the off-chip Start-TX, rst_n the chip reset. For a measurement,
// Start-TX must fall before the Shut-down Count is reached, and
// shutdown_count must be >= el_count (as the description requires).
//
// Follows the description: counter width, the two equality comparators,
// Pre-Early latching, the Early/Late flop on the falling Start-TX edge and
// the reset of all blocks on Shut-down. This design's own choices: the
// toggle-pair enable, ending the burst one DCO cycle after the Shut-down
// compare matches, the pulse-count compare (n_pulses) on the same counter,
// and the early_late reset value 0.
module burst_counter
  import uwb_tx_pkg::*;
#(
  parameter int unsigned CNT_W_P = CNT_W
) (
  input  logic               clk,
  input  logic               tick,
  input  logic               rst_n,
  input  logic               start_tx,
  input  logic [CNT_W_P-1:0] n_pulses,
  input  logic [CNT_W_P-1:0] el_count,
  input  logic [CNT_W_P-1:0] shutdown_count,
  output logic               tx_en,
  output logic [CNT_W_P-1:0] count,
  output logic               in_burst,
  output logic               pre_early,
  output logic               shutdown,
  output logic               early_late
);
  timeunit 1ps;
  timeprecision 1fs;

  logic start_tgl;   // toggles on each accepted Start-TX rising edge
  logic stop_tgl;    // copies start_tgl when a burst ends

  always_ff @(posedge start_tx or negedge rst_n) begin
    if (!rst_n)      start_tgl <= 1'b0;
    else if (!tx_en) start_tgl <= ~start_tgl;
  end

  assign tx_en    = start_tgl ^ stop_tgl;
  assign shutdown = tx_en & (count == shutdown_count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      pre_early <= 1'b0;
      stop_tgl  <= 1'b0;
    end else if (tx_en) begin
      if (shutdown) begin
        count     <= '0;
        pre_early <= 1'b0;
        stop_tgl  <= start_tgl;
      end else begin
        if (tick) count <= count + 1'b1;
        if (count == el_count) pre_early <= 1'b1;
      end
    end
  end

  assign in_burst = tx_en & (count < n_pulses);

  always_ff @(negedge start_tx or negedge rst_n) begin
    if (!rst_n) early_late <= 1'b0;
    else        early_late <= pre_early;
  end

endmodule
