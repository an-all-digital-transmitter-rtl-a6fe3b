// Behavioural model of the digitally controlled ring oscillator (not
// synthesizable: it uses delays to stand for an analog circuit).
//
// The silicon oscillator is a three-stage single-ended ring whose first
// stage is a NAND with the enable input. Coarse tuning switches in three
// thermometer-coded load capacitors (four frequency regions); fine tuning
// sets the NMOS/PMOS current-starving DACs of all three stages to
// strength[5:0], and the stage-2 and stage-3 DACs can each be raised by one
// more step (extra1, extra2), giving 3*strength + extra1 + extra2 fine steps
// per region (about 7.5 bits) and about 9.5 bits in all.
//
// Model: the ring itself, three stages each delaying by a sixth of the
// period for the present code: stage 1 = NAND(enable, stage 3), stages 2
// and 3 inverters, osc = stage 3. While disabled the NAND output is held
// high, so osc idles high. The enable reaches the NAND through a model
// delay chosen so that the first falling edge of osc comes START_DELAY_PS
// after en rises (the start-up time); disabling is immediate and the ring
// settles with osc high within half a period. The frequency is a straight
// line over the linear code (3 - caps)*192 + fine from F_MIN_MHZ to
// F_MAX_MHZ (the typical-corner tuning range); each stage picks up the
// delay of the code present when its input changes.
//
// Synthesis note: the three stages form a combinational loop, which a
// synthesis tool reports as a logic loop; that loop is the ring
// oscillator, so the warning is expected. The delays are dropped there.
// A linter that cannot see the delay values warns that they might be
// zero; they never are (stage_fs is at least 27,000 fs and en_dly_fs at
// least 1,500,000 fs for the default parameters).
//
// Follows the description: ports, the NAND-enabled three-stage ring, code
// structure and tuning range. The linear frequency law, the start-up
// delay and the high idle level are this model's own choices; the real
// curve is set by process, voltage and temperature.
module dco #(
  parameter int unsigned F_MIN_MHZ      = 2200,
  parameter int unsigned F_MAX_MHZ      = 6000,
  parameter int unsigned START_DELAY_PS = 2000
) (
  input  logic       en,
  input  logic [5:0] strength,
  input  logic       extra1,
  input  logic       extra2,
  input  logic [2:0] cap_therm,
  output logic       osc
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CODES = 4 * 192;

  int unsigned caps, code;
  longint      f_khz, stage_fs, en_dly_fs;
  logic        en_d;        // enable after the start-up delay
  logic        n1, n2, n3;  // ring stages

  always_comb begin
    caps      = int'(cap_therm[0]) + int'(cap_therm[1]) + int'(cap_therm[2]);
    code      = (3 - caps) * 192 + 3 * int'(strength) + int'(extra1) + int'(extra2);
    f_khz     = 64'(F_MIN_MHZ) * 1000
              + 64'(code) * 64'(F_MAX_MHZ - F_MIN_MHZ) * 1000 / 64'(CODES - 1);
    stage_fs  = 64'd1_000_000_000_000 / (6 * f_khz);   // a sixth of the period
    en_dly_fs = 64'(START_DELAY_PS) * 1000 - 3 * stage_fs;
  end

  initial begin
    en_d = 1'b0;
    n1   = 1'b1;
    n2   = 1'b0;
    n3   = 1'b1;
  end

  always @(en) begin
    if (en) en_d <= #(en_dly_fs * 1fs) 1'b1;
    else    en_d <= 1'b0;
  end

  always @(en or en_d or n3) n1 <= #(stage_fs * 1fs) ~(en & en_d & n3);
  always @(n1)               n2 <= #(stage_fs * 1fs) ~n1;
  always @(n2)               n3 <= #(stage_fs * 1fs) ~n2;

  assign osc = n3;

endmodule
