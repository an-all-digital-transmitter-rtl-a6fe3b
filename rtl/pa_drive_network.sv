// Activation multiplexers and common-mode control of the dual PA.
//
// Each of the NUM_CELLS tri-state inverter slices has a five-input
// multiplexer that selects its dynamic activation: one of the shaping
// signals S1..S4, or ground (slice statically off, used for gain control).
// Slice i of both PAs listens to activation line act[i], so the two paths
// stay matched. The number of slices on each signal sets the weight of that
// FIR tap, and hence the pulse envelope.
//
// While no pulse is being shaped (busy low) the PA outputs are tri-stated
// and the common-mode devices hold the two PA nodes at opposite rails:
// node A pre-charged to VDD and node B pre-discharged to GND in normal use.
// cm_a_high / cm_b_high pick the idle level of each node; setting both the
// same turns capacitive combining off (a test mode). The devices are never
// on while busy is high.
//
// Interface: purely combinational. a_pchg_n / b_pchg_n drive PMOS
// pre-charge devices (active low); a_pdis / b_pdis drive NMOS
// pre-discharge devices (active high).
//
// Follows the description: five-input multiplexers with a grounded input,
// a 30-line activation bus shared by the two PAs, and idle-only
// pre-charge/pre-discharge with optional devices on both nodes. The busy
// signal as the idle criterion is this design's own choice.
module pa_drive_network
  import uwb_tx_pkg::*;
#(
  parameter int unsigned NUM_CELLS_P = NUM_CELLS
) (
  input  logic                      [3:0] s,
  input  logic                            busy,
  input  pa_sel_e [NUM_CELLS_P-1:0]       pa_sel,
  input  logic                            cm_a_high,
  input  logic                            cm_b_high,
  output logic    [NUM_CELLS_P-1:0]       act,
  output logic                            a_pchg_n,
  output logic                            a_pdis,
  output logic                            b_pchg_n,
  output logic                            b_pdis
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    for (int i = 0; i < int'(NUM_CELLS_P); i++) begin
      unique case (pa_sel[i])
        PA_S1:   act[i] = s[0];
        PA_S2:   act[i] = s[1];
        PA_S3:   act[i] = s[2];
        PA_S4:   act[i] = s[3];
        default: act[i] = 1'b0;
      endcase
    end
  end

  assign a_pchg_n = ~(~busy &  cm_a_high);
  assign a_pdis   =   ~busy & ~cm_a_high;
  assign b_pchg_n = ~(~busy &  cm_b_high);
  assign b_pdis   =   ~busy & ~cm_b_high;

endmodule
