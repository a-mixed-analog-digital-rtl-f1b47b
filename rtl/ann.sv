// ann: behavioural model of the quantifier subnet, the analog array of
// N_NEURONS charge-based neurons (see neuron.sv) that all see the same
// N_SYN-bit input vector. Each neuron's synapse latches are loaded from the
// weight memory on ld_w. neuron_en keeps neurons idle: during a training
// forward pass only the neuron being trained is enabled.
//
// Outputs are every neuron's activation (dendritic voltage as a count of unit
// capacitances) and hard-limiter output, valid after phi3. The phase clocks
// come from the clock driver (phi[0] = phi1 ...); the quantifier uses phi1
// to phi3 only, phi4 and phi5 belong to the winner-take-all, which is why the
// upper bits of phi are unused here. The array structure (every input to
// every neuron, idle neurons during training) follows the published
// architecture; the enable mask is this design's way of idling neurons.
module ann #(
  parameter int unsigned N_NEURONS = ann_pkg::N_NEURONS,
  parameter int unsigned N_SYN     = ann_pkg::N_SYN,
  parameter int unsigned W_BITS    = ann_pkg::W_BITS,
  parameter int unsigned ACT_BITS  = ann_pkg::ACT_BITS,
  parameter int unsigned N_PHASES  = ann_pkg::N_PHASES
) (
  input  logic                                        clk,
  input  logic                                        ld_w,
  input  logic [N_NEURONS-1:0][N_SYN-1:0][W_BITS-1:0] weights,
  input  logic [N_PHASES-1:0]                         phi,
  input  logic [N_NEURONS-1:0]                        neuron_en,
  input  logic [N_SYN-1:0]                            x,
  input  logic [ACT_BITS-1:0]                         theta,
  output logic [N_NEURONS-1:0][ACT_BITS-1:0]          act,
  output logic [N_NEURONS-1:0]                        fire
);
  for (genvar k = 0; k < N_NEURONS; k++) begin : g_neuron
    neuron #(.N_SYN(N_SYN), .W_BITS(W_BITS), .ACT_BITS(ACT_BITS)) u_neuron (
      .clk,
      .ld_w,
      .w_in (weights[k]),
      .phi1 (phi[ann_pkg::PH_SAMPLE]),
      .phi2 (phi[ann_pkg::PH_QUANT]),
      .phi3 (phi[ann_pkg::PH_LIMIT]),
      .en   (neuron_en[k]),
      .x,
      .theta,
      .act  (act[k]),
      .fire (fire[k])
    );
  end
endmodule
