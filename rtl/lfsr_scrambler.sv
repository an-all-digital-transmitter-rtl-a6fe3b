// BPSK phase scrambler with run-length limiting.
//
// A 15-bit Fibonacci LFSR implements g(D) = 1 + D^14 + D^15: the new bit is
// s[n] = s[n-14] xor s[n-15], and the bit leaving the register is the LFSR
// output. A run-length limiter watches its own previous outputs; when the
// LFSR would extend a run of equal output bits beyond the programmed limit
// (3, 4 or 5), it outputs the opposite value instead and a new run starts.
// rll_mode = RLL_OFF passes the LFSR output unchanged. The limiter output is
// registered, so the scrambler output is one step behind the LFSR; the first
// bit after reset is the register's reset value (0) and may be discarded.
//
// Interface: clk is the DCO clock and adv a one-cycle strobe per transmitted
// pulse (the register only moves on adv, so it advances at the pulse rate).
// rst_n low (asynchronous) or load high at a clock edge (synchronous)
// loads init, with init[0] = s0 being the first LFSR output bit; load has
// priority over adv.
// bpsk = 1 selects the inverted oscillator for the current pulse.
//
// Follows the description: the polynomial, the programmable initial state,
// the limits 3/4/5/off, and the one-step output delay. This design's own
// choices: the limiter counts the run of its own outputs, and the state is
// kept across bursts (only a reset or a load reloads it), so successive
// bursts continue one sequence.
module lfsr_scrambler
  import uwb_tx_pkg::*;
#(
  parameter int unsigned LFSR_W_P = LFSR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                adv,
  input  logic [LFSR_W_P-1:0] init,
  input  rll_mode_e           rll_mode,
  output logic                bpsk
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [LFSR_W_P-1:0] sr;      // sr[0] is the next output bit
  logic                lfsr_out;
  logic                fb;
  logic [2:0]          run;     // length of the present output run
  logic [2:0]          limit;
  logic                rll_bit;

  assign lfsr_out = sr[0];
  // sr[0] = s[n], sr[13] = s[n+13], sr[14] = s[n+14]:
  // s[n+15] = s[n+1] xor s[n]
  assign fb       = sr[0] ^ sr[1];

  always_comb begin
    unique case (rll_mode)
      RLL_3:   limit = 3'd3;
      RLL_4:   limit = 3'd4;
      RLL_5:   limit = 3'd5;
      default: limit = 3'd0;
    endcase
    if (limit != 3'd0 && lfsr_out == bpsk && run >= limit) rll_bit = ~lfsr_out;
    else                                                   rll_bit = lfsr_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= init;
      bpsk <= 1'b0;
      run  <= 3'd0;
    end else if (load) begin
      sr   <= init;
      bpsk <= 1'b0;
      run  <= 3'd0;
    end else if (adv) begin
      sr   <= {fb, sr[LFSR_W_P-1:1]};
      bpsk <= rll_bit;
      if (rll_bit == bpsk && run != 3'd7) run <= run + 3'd1;
      else if (rll_bit != bpsk)           run <= 3'd1;
    end
  end

endmodule
