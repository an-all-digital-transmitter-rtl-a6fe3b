// All-digital pulsed-UWB transmitter.
//
// A burst of back-to-back pulses is sent on each rising edge of Start-TX.
// The edge enables a ring DCO (tuned near 3.5, 4.0 or 4.5 GHz). A divider
// of half-transparent latches divides the DCO down to the 499.2 MHz pulse
// rate; its phases, whose duty cycles step in 1/N, feed the pulse shaper,
// which builds four shaping signals S1..S4. Thirty activation multiplexers
// route those signals to the tri-state inverter slices of two PAs, so the
// number of enabled slices, and hence the pulse envelope, steps through
// four levels within every 2 ns pulse. A 15-bit LFSR with run-length
// limiting chooses, per pulse, whether the PAs see the oscillator or its
// inverse (BPSK scrambling). The two PA outputs idle at opposite rails and
// are combined through coupling capacitors, so their low-frequency
// transients cancel while the in-phase RF adds.
//
// A 5-bit counter at the pulse rate bounds the burst (n_pulses), latches
// Pre-Early at E/L Count and shuts the transmitter down at Shut-down
// Count. The falling Start-TX edge samples Pre-Early: early/late tells
// whether the DCO is fast or slow, and the successive-approximation
// calibration (fll_sar, running on the 31.2 MHz reference) uses it to set
// the DCO code. While calibrating, fll_sar drives the internal Start-TX.
//
// Configuration is shifted in serially (sclk/sdi, sload to apply; see
// uwb_tx_pkg::tx_cfg_t for the layout). Each sload (and the reset) flags a
// scrambler reload: a toggle flop in the sclk domain differs from its copy
// in the DCO domain, and the first DCO edge of the next burst loads the
// new initial state (pulse 0 of a burst always uses the register's reset
// value 0, so nothing is lost). The DCO is stopped while configuring, so
// the toggle is stable long before it is sampled.
//
// Outputs for observation: the DCO signal, tx_en (burst active), the pulse
// counter with its in_burst, Pre-Early and Shut-down signals, the BPSK
// bit, the 30-line activation bus and the drive state of PA nodes A, B and
// the RF drive summed at node C.
//
// tx_en is both the asynchronous reset of the divider and pulse shaper
// (they restart from their reset state in every burst) and a synchronous
// input inside the burst counter; a linter notes that mix, which is
// intended: tx_en only changes while those blocks' clock is stopped or
// at the edge that ends the burst.
//
// Follows the description: the block structure and connections of the
// transmitter. This design's own choices: one clock domain (the DCO) with
// the divider's period strobe as the pulse-rate enable, the Start-TX
// multiplexer for calibration, and the scrambler reload after sload.
module uwb_tx_top
  import uwb_tx_pkg::*;
(
  input  logic                  rst_n,
  input  logic                  start_tx,
  input  logic                  ref_clk,
  input  logic                  cal_start,
  input  logic                  sclk,
  input  logic                  sdi,
  input  logic                  sload,
  output logic                  sdo,
  output logic                  cal_busy,
  output logic                  cal_done,
  output logic [TUNE_W-1:0]     tune,
  output logic                  early_late,
  output logic                  osc,
  output logic                  tx_en,
  output logic [CNT_W-1:0]      count,
  output logic                  in_burst,
  output logic                  pre_early,
  output logic                  shutdown,
  output logic                  bpsk,
  output logic [NUM_CELLS-1:0]  act,
  output pa_node_t              pa_a,
  output pa_node_t              pa_b,
  output logic signed [7:0]     pa_c
);
  timeunit 1ps;
  timeprecision 1fs;

  tx_cfg_t              cfg;
  dco_ctrl_t            dctl;
  logic                 sar_start, start_int;
  logic [NUM_HTL-1:0]   phase;
  logic                 tick;
  logic [3:0]           s;
  logic                 busy;
  logic                 a_pchg_n, a_pdis, b_pchg_n, b_pdis;
  logic                 load_tgl;   // sclk domain: toggles on each sload
  logic                 load_ack;   // DCO domain: copy after the reload
  logic                 scr_load;

  cfg_shift_reg u_cfg (
    .rst_n (rst_n),
    .sclk  (sclk),
    .sdi   (sdi),
    .sload (sload),
    .sdo   (sdo),
    .cfg   (cfg)
  );

  fll_sar u_fll (
    .clk        (ref_clk),
    .rst_n      (rst_n),
    .cal_start  (cal_start),
    .early_late (early_late),
    .start_tx   (sar_start),
    .tune       (tune),
    .busy       (cal_busy),
    .done       (cal_done)
  );

  assign start_int = cal_busy ? sar_start : start_tx;
  assign dctl      = tune_to_dco(tune);

  dco u_dco (
    .en        (tx_en),
    .strength  (dctl.strength),
    .extra1    (dctl.extra1),
    .extra2    (dctl.extra2),
    .cap_therm (dctl.cap_therm),
    .osc       (osc)
  );

  htl_divider u_div (
    .clk    (osc),
    .rst_n  (tx_en),
    .bypass (cfg.div_bypass),
    .phase  (phase),
    .tick   (tick)
  );

  burst_counter u_cnt (
    .clk            (osc),
    .tick           (tick),
    .rst_n          (rst_n),
    .start_tx       (start_int),
    .n_pulses       (cfg.n_pulses),
    .el_count       (cfg.el_count),
    .shutdown_count (cfg.shutdown_count),
    .tx_en          (tx_en),
    .count          (count),
    .in_burst       (in_burst),
    .pre_early      (pre_early),
    .shutdown       (shutdown),
    .early_late     (early_late)
  );

  // Scrambler reload request: reset leaves the flops unequal, so the
  // first burst after reset also reloads (the configuration is then its
  // default value).
  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n)     load_tgl <= 1'b1;
    else if (sload) load_tgl <= ~load_tgl;
  end

  always_ff @(posedge osc or negedge rst_n) begin
    if (!rst_n) load_ack <= 1'b0;
    else        load_ack <= load_tgl;
  end

  assign scr_load = load_tgl ^ load_ack;

  lfsr_scrambler u_scr (
    .clk      (osc),
    .rst_n    (rst_n),
    .load     (scr_load),
    .adv      (tick & in_burst),
    .init     (cfg.lfsr_init),
    .rll_mode (cfg.rll_mode),
    .bpsk     (bpsk)
  );

  pulse_shaper u_shp (
    .clk       (osc),
    .rst_n     (tx_en),
    .phase     (phase),
    .in_burst  (in_burst),
    .phi_sel   (cfg.phi_sel),
    .fir_delay (cfg.fir_delay),
    .s         (s),
    .busy      (busy)
  );

  pa_drive_network u_net (
    .s         (s),
    .busy      (busy),
    .pa_sel    (cfg.pa_sel),
    .cm_a_high (cfg.cm_a_high),
    .cm_b_high (cfg.cm_b_high),
    .act       (act),
    .a_pchg_n  (a_pchg_n),
    .a_pdis    (a_pdis),
    .b_pchg_n  (b_pchg_n),
    .b_pdis    (b_pdis)
  );

  dual_pa u_pa (
    .osc      (osc),
    .bpsk     (bpsk),
    .act      (act),
    .pa_en    (cfg.pa_en),
    .a_pchg_n (a_pchg_n),
    .a_pdis   (a_pdis),
    .b_pchg_n (b_pchg_n),
    .b_pdis   (b_pdis),
    .node_a   (pa_a),
    .node_b   (pa_b),
    .node_c   (pa_c)
  );

endmodule
