// wta: behavioural model of the discriminator subnet, the analog
// winner-take-all (lateral inhibition network with output buffers).
//
// Among the neurons whose hard limiter fired, the one with the largest
// activation (smallest Hamming distance to its stored pattern) wins. Equal
// largest activations give several winners: all outputs are brought out so
// that this case can be seen. With no neuron above threshold there is no
// winner. The competition resolves on phi4 and the output buffers take the
// result on phi5; the result holds until the next phi5. phi1 to phi3 belong
// to the quantifier and are unused here. Winner selection and the observable
// multiple-winner case follow the published design; restricting the
// competition to firing neurons and the phase use are this design's choices.
module wta #(
  parameter int unsigned N_NEURONS = ann_pkg::N_NEURONS,
  parameter int unsigned ACT_BITS  = ann_pkg::ACT_BITS,
  parameter int unsigned N_PHASES  = ann_pkg::N_PHASES
) (
  input  logic [N_PHASES-1:0]                phi,
  input  logic [N_NEURONS-1:0][ACT_BITS-1:0] act,
  input  logic [N_NEURONS-1:0]               fire,
  output logic [N_NEURONS-1:0]               y
);
  logic [ACT_BITS-1:0]  best;
  logic [N_NEURONS-1:0] win;
  logic [N_NEURONS-1:0] win_r;

  always_comb begin
    best = '0;
    for (int unsigned k = 0; k < N_NEURONS; k++)
      if (fire[k] && act[k] > best) best = act[k];
    for (int unsigned k = 0; k < N_NEURONS; k++)
      win[k] = fire[k] && (act[k] == best);
  end

  always_ff @(posedge phi[ann_pkg::PH_COMPETE]) win_r <= win;
  always_ff @(posedge phi[ann_pkg::PH_LATCH])   y     <= win_r;
endmodule
