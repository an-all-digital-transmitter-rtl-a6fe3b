// Successive-approximation frequency calibration (the frequency-locked
// loop's control side).
//
// The loop compares the DCO against the reference with the transmitter's
// own early/late detector. For each trial code the controller raises
// Start-TX for one reference cycle and lowers it for one cycle (a 15.6 MHz
// symbol from a 31.2 MHz reference, 50% duty). With E/L Count = 16 a DCO
// that is exactly on frequency reaches the count as Start-TX falls; the
// Early/Late flop reports early (too fast) or late (too slow). The search
// starts with the code's top bit set; after each symbol the bit under test
// is cleared if the DCO was early, and the next lower bit is set. After
// TUNE_W symbols the code is the fastest setting the detector called late,
// i.e. within one code of the reference.
//
// Timing: cal_start (one clk cycle, while idle or done) loads the first
// trial code and raises start_tx on the same edge. A new trial code is
// applied on the same edge that raises Start-TX for its measurement, so the
// DCO starts from the new code. busy is high during the search; done rises
// 2*TUNE_W clk cycles after cal_start and stays high until the next
// cal_start. tune holds its value between calibrations; it resets to
// mid-scale (top bit set).
//
// Follows the description: successive approximation on early/late
// decisions at 15.6 MHz, converging to within one code. This design's own
// choices: one symbol per decision and the 10-bit linear code, which takes
// TUNE_W = 10 symbols (the description reports 12 cycles for its
// implementation).
module fll_sar
  import uwb_tx_pkg::*;
#(
  parameter int unsigned TUNE_W_P = TUNE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cal_start,
  input  logic                early_late,
  output logic                start_tx,
  output logic [TUNE_W_P-1:0] tune,
  output logic                busy,
  output logic                done
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {S_IDLE, S_HIGH, S_DECIDE} sar_state_e;

  sar_state_e                    state;
  logic [$clog2(TUNE_W_P)-1:0]   bit_idx;

  logic [TUNE_W_P-1:0]           tune_dec;   // code after this decision

  assign busy = (state != S_IDLE);

  // Early (DCO too fast): drop the bit under test. Then try the next one.
  always_comb begin
    tune_dec = tune;
    if (early_late) tune_dec[bit_idx] = 1'b0;
    if (bit_idx != '0) tune_dec[bit_idx - 1'b1] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      bit_idx  <= '0;
      tune     <= TUNE_W_P'(1) << (TUNE_W_P - 1);
      start_tx <= 1'b0;
      done     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (cal_start) begin
            tune     <= TUNE_W_P'(1) << (TUNE_W_P - 1);
            bit_idx  <= $bits(bit_idx)'(TUNE_W_P - 1);
            start_tx <= 1'b1;
            done     <= 1'b0;
            state    <= S_HIGH;
          end
        end
        S_HIGH: begin                      // Start-TX falls: detector samples
          start_tx <= 1'b0;
          state    <= S_DECIDE;
        end
        S_DECIDE: begin
          tune <= tune_dec;
          if (bit_idx == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            bit_idx  <= bit_idx - 1'b1;
            start_tx <= 1'b1;
            state    <= S_HIGH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
