// Behavioural model of the dual capacitively coupled digital PA (the
// silicon part is transistor-level and drives analog nodes; this model
// reports how those nodes are driven, as counts).
//
// Input stage: the BPSK multiplexer passes the oscillator, or its
// inverse when bpsk = 1. The same signal feeds all 2 x NUM_CELLS tri-state
// inverters, so both paths carry in-phase RF. Slice i of the PA on node A
// is enabled when act[i] and pa_en[1] are high; slice i of the PA on node B
// when act[i] and pa_en[0] are high. An enabled slice drives its node to
// the inverse of its input; a disabled slice is high impedance. When a node
// is not driven, its pre-charge (PMOS, a_pchg_n / b_pchg_n low) or
// pre-discharge (NMOS, a_pdis / b_pdis high) device may hold it at a rail.
//
// Outputs: node_a / node_b give, per node, how many slices pull up and
// down and which common-mode device is on. node_c is the RF drive that the
// two coupling capacitors pass to the antenna: +1 per slice pulling up and
// -1 per slice pulling down, on both nodes. Its magnitude during a pulse is
// the envelope level set by the shaping signals; its sign follows the RF
// phase. The idle levels of A and B (opposite rails) cancel at node C and
// are not part of node_c.
//
// An assertion checks the rule that a common-mode device is never on while
// a slice drives the same node (that would draw static current).
//
// The pdis fields of node_a and node_b repeat the a_pdis / b_pdis inputs
// (the device is on exactly when its gate is driven), so a netlist check
// sees those two output bits wired straight from inputs.
//
// Follows the description: 30 slices per PA, a shared oscillator input,
// opposite idle common modes, pre-charge/pre-discharge devices on both
// nodes. The count abstraction of the analog nodes is this model's own.
module dual_pa
  import uwb_tx_pkg::*;
#(
  parameter int unsigned NUM_CELLS_P = NUM_CELLS
) (
  input  logic                   osc,
  input  logic                   bpsk,
  input  logic [NUM_CELLS_P-1:0] act,
  input  logic [1:0]             pa_en,
  input  logic                   a_pchg_n,
  input  logic                   a_pdis,
  input  logic                   b_pchg_n,
  input  logic                   b_pdis,
  output pa_node_t               node_a,
  output pa_node_t               node_b,
  output logic signed [7:0]      node_c
);
  timeunit 1ps;
  timeprecision 1fs;

  logic rf_in;      // BPSK multiplexer output
  logic inv_out;    // level an enabled slice drives
  int unsigned n_a, n_b;

  assign rf_in   = bpsk ? ~osc : osc;
  assign inv_out = ~rf_in;

  always_comb begin
    n_a = 0;
    n_b = 0;
    for (int i = 0; i < int'(NUM_CELLS_P); i++) begin
      if (act[i] && pa_en[1]) n_a++;
      if (act[i] && pa_en[0]) n_b++;
    end
    node_a.n_up = inv_out ? 5'(n_a) : 5'd0;
    node_a.n_dn = inv_out ? 5'd0 : 5'(n_a);
    node_a.pchg = ~a_pchg_n;
    node_a.pdis = a_pdis;
    node_b.n_up = inv_out ? 5'(n_b) : 5'd0;
    node_b.n_dn = inv_out ? 5'd0 : 5'(n_b);
    node_b.pchg = ~b_pchg_n;
    node_b.pdis = b_pdis;
    node_c = inv_out ? 8'(signed'(n_a + n_b)) : -8'(signed'(n_a + n_b));
  end

  always_comb begin
    if (n_a != 0) assert (a_pchg_n && !a_pdis)
      else $error("node A: common-mode device on while PA drives");
    if (n_b != 0) assert (b_pchg_n && !b_pdis)
      else $error("node B: common-mode device on while PA drives");
  end

endmodule
