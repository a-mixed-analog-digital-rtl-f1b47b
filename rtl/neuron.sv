// neuron: behavioural model of one charge-based quantifier neuron (analog
// circuit on the chip, not synthesizable logic in the real design).
//
// Each of the N_SYN synapses has four binary-weighted capacitors
// (1, 2, 4, 8 unit capacitances) and four memory latches holding its weight.
// When the input bit x_j is 1, the synapse's selected capacitors share charge
// onto the dendrite, so the dendritic voltage is proportional to
// sum_j x_j * w_j. The model represents that voltage as an integer count of
// unit capacitances (act) and the external threshold voltage V_theta as a
// code on the same scale (theta). The hard limiter fires when act >= theta.
// The integer scale and the >= comparison are this design's choices.
//
// Timing (phase assignment is this design's choice; the document gives five
// phase clocks and the order initialization / quantification /
// discrimination):
//   clk & ld_w  : synapse latches take w_in
//   phi1 rising : the input vector is sampled (applied to the synapses)
//   phi2 rising : dendritic voltage settles (act)
//   phi3 rising : hard limiter output (fire); an idle neuron (en = 0) keeps
//                 act = 0 and never fires
// phi4 and phi5 belong to the winner-take-all.
module neuron #(
  parameter int unsigned N_SYN    = ann_pkg::N_SYN,
  parameter int unsigned W_BITS   = ann_pkg::W_BITS,
  parameter int unsigned ACT_BITS = ann_pkg::ACT_BITS
) (
  input  logic                         clk,
  input  logic                         ld_w,
  input  logic [N_SYN-1:0][W_BITS-1:0] w_in,
  input  logic                         phi1,
  input  logic                         phi2,
  input  logic                         phi3,
  input  logic                         en,
  input  logic [N_SYN-1:0]             x,
  input  logic [ACT_BITS-1:0]          theta,
  output logic [ACT_BITS-1:0]          act,
  output logic                         fire
);
  logic [N_SYN-1:0][W_BITS-1:0] w_lat;
  logic [N_SYN-1:0]             x_s;
  logic [ACT_BITS-1:0]          charge;

  always_ff @(posedge clk)
    if (ld_w) w_lat <= w_in;

  always_ff @(posedge phi1) x_s <= x;

  always_comb begin
    charge = '0;
    for (int unsigned j = 0; j < N_SYN; j++)
      if (x_s[j]) charge += ACT_BITS'(w_lat[j]);
  end

  always_ff @(posedge phi2) act <= en ? charge : '0;

  always_ff @(posedge phi3) fire <= en && (act >= theta);
endmodule
