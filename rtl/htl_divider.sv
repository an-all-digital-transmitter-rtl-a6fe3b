// Programmable synchronous divider built from half-transparent latches.
//
// NUM_HTL latch stages form a chain that is closed by a pre-charge unit.
// After a reset every stage output is high and the pre-charge unit presents
// a low level at the chain input. Each enabled (not bypassed) stage passes
// a high input at once but takes a low input only on a rising DCO edge, so
// one falling edge walks one enabled stage per DCO cycle. When the edge is
// about to leave the last enabled stage, the pre-charge unit resets every
// stage high on that same edge and a new divide period begins. With N
// enabled stages the period is N DCO cycles, and enabled stage k (k = 0 is
// the first enabled stage) is high for k+1 cycles and low for N-1-k cycles
// of each period: duty cycles of 1/N ... (N-1)/N, which the pulse shaper
// uses. A bypassed stage is a pair of inverters, i.e. its output follows its
// input. With 0 or 1 stage enabled the divider divides by one.
//
// Interface: clk = DCO output; rst_n low holds every stage high (the block
// is reset between bursts); bypass[i] removes stage i; phase[i] is stage i's
// output; tick is high during the last DCO cycle of each divide period, so
// logic on clk that is enabled by tick runs once per output period (the
// 499.2 MHz pulse rate for Table 3.1 settings).
//
// Follows the description: the latch chain, per-stage bypass, divide ratio
// up to fourteen and the reset of all latches by the pre-charge unit at the
// start of every period. This design's own choice: the reset is taken on the
// DCO edge (the silicon applies it asynchronously), so the last enabled
// stage never shows its short low glitch.
module htl_divider
  import uwb_tx_pkg::*;
#(
  parameter int unsigned NUM_HTL_P = NUM_HTL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_HTL_P-1:0] bypass,
  output logic [NUM_HTL_P-1:0] phase,
  output logic                 tick
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [NUM_HTL_P-1:0] q;         // latched state of each stage
  logic [NUM_HTL_P-1:0] nxt_out;   // stage outputs just after the coming edge
  logic                 wrap;      // falling edge would reach the chain end

  // Present outputs: a bypassed stage follows its input, the chain input
  // is the pre-charge unit's low level. Second chain: the outputs after the
  // coming edge if no reset were applied (an enabled stage takes its
  // present input).
  always_comb begin
    logic cur_in, nxt_in;
    cur_in = 1'b0;
    nxt_in = 1'b0;
    for (int i = 0; i < int'(NUM_HTL_P); i++) begin
      nxt_out[i] = bypass[i] ? nxt_in : cur_in;
      phase[i]   = bypass[i] ? cur_in : q[i];
      cur_in     = phase[i];
      nxt_in     = nxt_out[i];
    end
    wrap = ~nxt_out[NUM_HTL_P-1];
  end

  assign tick = wrap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '1;
    else if (wrap) q <= '1;                            // pre-charge unit resets all latches
    else begin
      q <= {phase[NUM_HTL_P-2:0], 1'b0};
    end
  end

endmodule
