// ann_pkg: sizes and shared types of the mixed analog-digital Hamming
// network chip.
//
// The network has N_NEURONS = 20 quantifier neurons, each with N_SYN = 10
// binary inputs, and every synapse holds a W_BITS = 4 bit weight (four
// binary-weighted capacitors of 1, 2, 4 and 8 unit capacitances). These three
// numbers are the published chip's. ACT_BITS (width of a neuron activation,
// counted in unit capacitances) and ZETA_BITS (width of the learning step)
// are this design's choices: 10 synapses x 15 units = 150 fits in 8 bits.
package ann_pkg;

  localparam int unsigned N_NEURONS = 20;
  localparam int unsigned N_SYN     = 10;
  localparam int unsigned W_BITS    = 4;
  localparam int unsigned ACT_BITS  = 8;
  localparam int unsigned ZETA_BITS = 4;
  localparam int unsigned N_PHASES  = 5;

  // Phase clock indices: phi1 .. phi5 are bits 0 .. 4 of a phase vector.
  typedef enum int unsigned {
    PH_SAMPLE  = 0,  // phi1: input vector applied to the synapses
    PH_QUANT   = 1,  // phi2: dendritic voltages settle
    PH_LIMIT   = 2,  // phi3: hard limiter evaluates against the threshold
    PH_COMPETE = 3,  // phi4: winner-take-all competition
    PH_LATCH   = 4   // phi5: result taken by the output buffers
  } phase_e;

endpackage
