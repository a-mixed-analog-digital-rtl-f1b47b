// hamming_chip: a Hamming-network pattern classifier with on-chip learning,
// split into an analog neural core and digital control and training logic.
//
// Analog core (behavioural models here): the quantifier subnet (ann) of
// N_NEURONS charge-based neurons with N_SYN programmable 4-bit synapses each,
// and the winner-take-all discriminator (wta), both clocked by five phase
// clocks. Digital part: the controller (ccu) that runs the supervisor
// protocol, the phase clock generator (cgu) on its own ANN clock, the clock
// driver (clk_dvr) that substitutes external phases in test mode, the
// error-correction training unit (olu) and the scan-path weight memory (mmu).
// A stand-alone neuron with every signal on pins is included for
// characterization, as on the published chip.
//
// Supervisor protocol: load weights through the scan port, pulse ld_inits,
// then for each vector hold data (and, when training, train_mode,
// train_sel, target) stable, pulse start, and wait for done. In forward mode
// result shows the winner(s); in training mode corrected tells whether the
// selected neuron's weights were changed. zeta (learning step) may be loaded
// at any time with load_zeta; theta is the threshold code standing for the
// external threshold voltage. data and theta must stay stable until done.
//
// Sizes follow the published chip (20 neurons, 10 synapses, 4-bit weights).
module hamming_chip #(
  parameter int unsigned N_NEURONS = ann_pkg::N_NEURONS,
  parameter int unsigned N_SYN     = ann_pkg::N_SYN,
  parameter int unsigned W_BITS    = ann_pkg::W_BITS,
  parameter int unsigned ACT_BITS  = ann_pkg::ACT_BITS,
  parameter int unsigned ZETA_BITS = ann_pkg::ZETA_BITS,
  parameter int unsigned N_PHASES  = ann_pkg::N_PHASES,
  parameter int unsigned SEL_BITS  = $clog2(N_NEURONS)
) (
  input  logic                         clk,        // master clock
  input  logic                         rst_n,
  input  logic                         ann_clk,    // ANN driving clock
  // supervisor protocol
  input  logic                         ld_inits,
  input  logic                         start,
  input  logic                         train_mode,
  input  logic [SEL_BITS-1:0]          train_sel,
  input  logic                         target,
  input  logic [N_SYN-1:0]             data,
  input  logic [ACT_BITS-1:0]          theta,
  input  logic [ZETA_BITS-1:0]         zeta,
  input  logic                         load_zeta,
  output logic                         done,
  output logic                         busy,
  output logic                         corrected,
  output logic [N_NEURONS-1:0]         result,
  // weight memory scan port
  input  logic                         scan_en,
  input  logic                         scan_in,
  output logic                         scan_out,
  // test access
  input  logic                         test_mode,
  input  logic [N_PHASES-1:0]          test_phi,
  input  logic                         test_y_we,
  input  logic                         test_y_d,
  output logic                         test_y_q,
  output logic [ZETA_BITS-1:0]         test_zeta_q,
  // stand-alone test neuron
  input  logic                         tn_ld_w,
  input  logic [N_SYN-1:0][W_BITS-1:0] tn_w,
  input  logic                         tn_phi1,
  input  logic                         tn_phi2,
  input  logic                         tn_phi3,
  input  logic [N_SYN-1:0]             tn_x,
  input  logic [ACT_BITS-1:0]          tn_theta,
  output logic [ACT_BITS-1:0]          tn_act,
  output logic                         tn_fire
);
  logic                                        cgu_req, cgu_ack;
  logic [N_PHASES-1:0]                         cgu_phi, phi;
  logic                                        ld_w;
  logic [N_NEURONS-1:0]                        neuron_en;
  logic                                        y_capture, olu_start, olu_done;
  logic [SEL_BITS-1:0]                         sel;
  logic [SEL_BITS-1:0]                         row_addr;
  logic [N_SYN-1:0][W_BITS-1:0]                row_rdata, row_wdata;
  logic                                        row_we;
  logic [N_NEURONS-1:0][N_SYN-1:0][W_BITS-1:0] weights;
  logic [N_NEURONS-1:0][ACT_BITS-1:0]          act;
  logic [N_NEURONS-1:0]                        fire;

  ccu #(.N_NEURONS(N_NEURONS), .SEL_BITS(SEL_BITS)) u_ccu (
    .clk, .rst_n,
    .ld_inits, .start, .train_mode, .train_sel, .done, .busy,
    .cgu_req, .cgu_ack,
    .ld_w, .neuron_en,
    .y_capture, .olu_start, .olu_done, .sel
  );

  cgu #(.N_PHASES(N_PHASES)) u_cgu (
    .ann_clk, .rst_n, .req(cgu_req), .ack(cgu_ack), .phi(cgu_phi)
  );

  clk_dvr #(.N_PHASES(N_PHASES)) u_clk_dvr (
    .test_mode, .cgu_phi, .ext_phi(test_phi), .phi
  );

  olu #(.N_NEURONS(N_NEURONS), .N_SYN(N_SYN), .W_BITS(W_BITS),
        .ZETA_BITS(ZETA_BITS), .SEL_BITS(SEL_BITS)) u_olu (
    .clk, .rst_n,
    .zeta_in(zeta), .load_zeta, .zeta_q(test_zeta_q),
    .test_mode, .y_capture, .wta_out(result), .test_y_we, .test_y_d, .y_q(test_y_q),
    .start(olu_start), .sel, .x(data), .target, .done(olu_done), .corrected,
    .row_addr, .row_rdata, .row_wdata, .row_we
  );

  mmu #(.N_NEURONS(N_NEURONS), .N_SYN(N_SYN), .W_BITS(W_BITS),
        .SEL_BITS(SEL_BITS)) u_mmu (
    .clk, .scan_en, .scan_in, .scan_out,
    .row_raddr(row_addr), .row_rdata, .row_waddr(row_addr), .row_wdata, .row_we,
    .weights
  );

  ann #(.N_NEURONS(N_NEURONS), .N_SYN(N_SYN), .W_BITS(W_BITS),
        .ACT_BITS(ACT_BITS), .N_PHASES(N_PHASES)) u_ann (
    .clk, .ld_w, .weights, .phi, .neuron_en, .x(data), .theta, .act, .fire
  );

  wta #(.N_NEURONS(N_NEURONS), .ACT_BITS(ACT_BITS), .N_PHASES(N_PHASES)) u_wta (
    .phi, .act, .fire, .y(result)
  );

  neuron #(.N_SYN(N_SYN), .W_BITS(W_BITS), .ACT_BITS(ACT_BITS)) u_test_neuron (
    .clk, .ld_w(tn_ld_w), .w_in(tn_w),
    .phi1(tn_phi1), .phi2(tn_phi2), .phi3(tn_phi3),
    .en(1'b1), .x(tn_x), .theta(tn_theta), .act(tn_act), .fire(tn_fire)
  );
endmodule
