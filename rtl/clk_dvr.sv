// clk_dvr: clock driver of the analog section. In normal operation the
// quantifier and winner-take-all receive the phase clocks from the clock
// generator; in test mode they receive them from external pins, so that the
// analog blocks can be exercised on their own. test_mode is a static
// configuration pin and must only change while all phases are low. The
// selection is a plain multiplexer (this design's choice; the document only
// names the unit and its test role).
module clk_dvr #(
  parameter int unsigned N_PHASES = ann_pkg::N_PHASES
) (
  input  logic                test_mode,
  input  logic [N_PHASES-1:0] cgu_phi,
  input  logic [N_PHASES-1:0] ext_phi,
  output logic [N_PHASES-1:0] phi
);
  always_comb phi = test_mode ? ext_phi : cgu_phi;
endmodule
