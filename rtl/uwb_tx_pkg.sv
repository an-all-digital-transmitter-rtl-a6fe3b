// Shared types and constants of the pulsed-UWB transmitter.
//
// The transmitter is configured by one serial shift register; tx_cfg_t is
// the layout of that register (bit 0 of the packed struct is the first bit
// shifted in). Sizes that come from the transmitter's description: fourteen
// divider latches, thirty tri-state inverter slices per PA, a 5-bit pulse
// counter, a 15-bit scrambler, run-length limits of 3/4/5 and an eight-step
// FIR delay. The DCO tuning code layout (6-bit strength shared by three
// DACs, two single-step extras, three thermometer capacitors) also follows
// the description; the mapping from one linear 10-bit code onto those
// fields (tune_to_dco) is this design's own choice, made so that a
// successive-approximation search sees a monotonic code.
package uwb_tx_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NUM_HTL      = 14;  // divider latches
  localparam int unsigned NUM_CELLS    = 30;  // tri-state inverters per PA
  localparam int unsigned CNT_W        = 5;   // pulse counter width
  localparam int unsigned LFSR_W       = 15;  // scrambler length
  localparam int unsigned DLY_W        = 3;   // FIR delay code width
  localparam int unsigned TUNE_W       = 10;  // linear DCO tuning code
  localparam int unsigned FINE_STEPS   = 192; // 3*63 + 2 + 1 fine codes per capacitor setting
  localparam int unsigned TUNE_MAX     = 4 * FINE_STEPS - 1; // 767

  // Five-input activation multiplexer of one inverter slice.
  typedef enum logic [2:0] {
    PA_OFF = 3'd0,  // grounded input: slice statically disabled (gain control)
    PA_S1  = 3'd1,
    PA_S2  = 3'd2,
    PA_S3  = 3'd3,
    PA_S4  = 3'd4
  } pa_sel_e;

  typedef enum logic [1:0] {
    RLL_OFF = 2'd0,
    RLL_3   = 2'd1,
    RLL_4   = 2'd2,
    RLL_5   = 2'd3
  } rll_mode_e;

  typedef struct packed {
    logic [2:0] cap_therm;  // number of ones = capacitors switched in
    logic [5:0] strength;   // shared DAC value of all three stages
    logic       extra1;     // stage-2 DAC +1
    logic       extra2;     // stage-3 DAC +1
  } dco_ctrl_t;

  // Electrical state of one PA output node (A or B), abstracted to counts.
  typedef struct packed {
    logic [4:0] n_up;     // inverters pulling the node to VDD
    logic [4:0] n_dn;     // inverters pulling the node to GND
    logic       pchg;     // pre-charge device on (node held at VDD)
    logic       pdis;     // pre-discharge device on (node held at GND)
  } pa_node_t;

  typedef struct packed {
    rll_mode_e               rll_mode;        // [158:157]
    logic [LFSR_W-1:0]       lfsr_init;       // s14..s0
    logic [CNT_W-1:0]        shutdown_count;
    logic [CNT_W-1:0]        el_count;
    logic [CNT_W-1:0]        n_pulses;        // pulses per burst
    logic                    cm_b_high;       // node B idle level (0 = normal)
    logic                    cm_a_high;       // node A idle level (1 = normal)
    logic [1:0]              pa_en;           // [1] = PA on node A, [0] = PA on node B
    pa_sel_e [NUM_CELLS-1:0] pa_sel;
    logic [DLY_W-1:0]        fir_delay;
    logic [3:0][3:0]         phi_sel;         // [k] = latch index used as phi(k+1)
    logic [NUM_HTL-1:0]      div_bypass;      // [13:0]
  } tx_cfg_t;

  localparam int unsigned CFG_W = $bits(tx_cfg_t);

  // Linear tuning code -> DCO control fields. Higher codes are faster:
  // code = (3 - caps) * 192 + 3*strength + extra1 + extra2.
  function automatic dco_ctrl_t tune_to_dco(logic [TUNE_W-1:0] code);
    dco_ctrl_t   d;
    int unsigned c, region, fine;
    c      = (int'(code) > int'(TUNE_MAX)) ? TUNE_MAX : int'(code);
    region = c / FINE_STEPS;
    fine   = c % FINE_STEPS;
    case (region)
      0:       d.cap_therm = 3'b111;
      1:       d.cap_therm = 3'b011;
      2:       d.cap_therm = 3'b001;
      default: d.cap_therm = 3'b000;
    endcase
    d.strength = 6'(fine / 3);
    d.extra1   = (fine % 3) >= 1;
    d.extra2   = (fine % 3) >= 2;
    return d;
  endfunction

  // Reset configuration: 3993.6 MHz channel (divide by 8), 16-pulse bursts,
  // E/L Count 16, a four-level shape on all thirty slices, both PAs on,
  // scrambler start state 0,0,1,...,1, no run-length limit.
  function automatic tx_cfg_t cfg_default();
    tx_cfg_t c;
    c.div_bypass     = 14'b11_1111_0000_0000;  // latches 0..7 enabled
    c.phi_sel[0]     = 4'd1;                   // 2/8 duty
    c.phi_sel[1]     = 4'd2;                   // 3/8
    c.phi_sel[2]     = 4'd4;                   // 5/8
    c.phi_sel[3]     = 4'd5;                   // 6/8
    c.fir_delay      = 3'd1;
    for (int i = 0; i < int'(NUM_CELLS); i++)
      c.pa_sel[i] = (i < 6) ? PA_S1 : (i < 12) ? PA_S2 : (i < 21) ? PA_S3 : PA_S4;
    c.pa_en          = 2'b11;
    c.cm_a_high      = 1'b1;
    c.cm_b_high      = 1'b0;
    c.n_pulses       = 5'd16;
    c.el_count       = 5'd16;
    c.shutdown_count = 5'd20;
    c.lfsr_init      = 15'b111_1111_1111_1100;  // s0 = s1 = 0, s2..s14 = 1
    c.rll_mode       = RLL_OFF;
    return c;
  endfunction

endpackage
