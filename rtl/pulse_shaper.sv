// Four-level pulse-shaping signal generator.
//
// Four divider phases phi1..phi4 are picked by phi_sel (latch indices).
// With phases of increasing duty cycle, phi1 xor phi4 is a wide window and
// phi2 xor phi3 a narrow window centred inside each pulse period. Each
// window is gated by in_burst and fed to a one-tap FIR: the direct signal
// and a copy delayed by fir_delay DCO cycles. The four results are the
// shaping signals S1 (wide), S2 (wide, delayed), S3 (narrow) and S4
// (narrow, delayed). The PA slices that listen to each signal add up, so
// the PA envelope steps through up to four levels during every pulse and is
// zero at period boundaries, where the BPSK phase may change.
//
// Interface: clk is the DCO clock, rst_n the block reset (low between
// bursts), phase the divider outputs, s[0..3] = S1..S4, busy is high while
// a pulse window is open or a delayed copy is still in flight (the PA's
// common-mode devices must stay off while busy). Latency: S1/S3 are
// combinational from the divider registers; S2/S4 follow after fir_delay
// cycles (0..7).
//
// Follows the description: the XOR pairs phi1/phi4 and phi2/phi3, one-tap
// FIRs giving four signals, and eight delay settings. This design's own
// choice: the delay is counted in whole DCO cycles (the silicon uses a few
// inverter delays), and windows are gated by the pulse count.
module pulse_shaper
  import uwb_tx_pkg::*;
#(
  parameter int unsigned NUM_PH = NUM_HTL,
  parameter int unsigned DLY_W_P = DLY_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_PH-1:0]     phase,
  input  logic                  in_burst,
  input  logic [3:0][3:0]       phi_sel,
  input  logic [DLY_W_P-1:0]    fir_delay,
  output logic [3:0]            s,
  output logic                  busy
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned DEPTH = (1 << DLY_W_P) - 1;

  logic [3:0]       phi;
  logic             wide, narrow;
  logic [DEPTH:1]   wide_dl, narrow_dl;   // [k] = window k cycles ago

  always_comb begin
    for (int k = 0; k < 4; k++)
      phi[k] = (int'(phi_sel[k]) < int'(NUM_PH)) ? phase[phi_sel[k]] : 1'b0;
    wide   = in_burst & (phi[0] ^ phi[3]);
    narrow = in_burst & (phi[1] ^ phi[2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wide_dl   <= '0;
      narrow_dl <= '0;
    end else begin
      wide_dl   <= {wide_dl[DEPTH-1:1], wide};
      narrow_dl <= {narrow_dl[DEPTH-1:1], narrow};
    end
  end

  always_comb begin
    s[0] = wide;
    s[2] = narrow;
    if (fir_delay == '0) begin
      s[1] = wide;
      s[3] = narrow;
    end else begin
      s[1] = wide_dl[fir_delay];
      s[3] = narrow_dl[fir_delay];
    end
    busy = in_burst | (|wide_dl) | (|narrow_dl);
  end

endmodule
