// olu: training (error-correction) unit. Implements the hardware-friendly
// form of error-correction learning used on the chip:
//
//   w_j(n+1) = w_j(n) + zeta   if x_j = 1, d = 1, y = 0
//   w_j(n+1) = w_j(n) - zeta   if x_j = 1, d = 0, y = 1
//   w_j(n+1) = w_j(n)          otherwise
//
// x is the input vector, d the expected output given by the supervisor and
// y the binary forward-pass result of the neuron being trained. Because x,
// d and y are binary, eta * (d - y) * x_j reduces to 0 or +/- zeta, and zeta
// is the only multi-bit parameter; it is loaded from outside at any time
// (load_zeta). Weights saturate at 0 and 2^W_BITS - 1 (this design's choice:
// the document does not say what happens at the range ends).
//
// The forward result y is kept in a register that is written from the WTA
// output of the selected neuron on y_capture, or from the test port
// (test_y_we) and is always readable (y_q). In test mode y_capture is
// ignored, so the value written from outside controls the next correction.
//
// Timing: start is sampled on a clk edge; in the next cycle the selected row
// of the weight memory is read and the new row computed into row_wdata, with
// row_we (only if a correction applies) and done raised for one cycle, two
// clocks after start. The memory takes the row on the edge that ends that
// cycle, so a weight load requested in response to done sees the new row. corrected tells whether the pass changed the
// weights; it holds until the next pass.
module olu #(
  parameter int unsigned N_NEURONS = ann_pkg::N_NEURONS,
  parameter int unsigned N_SYN     = ann_pkg::N_SYN,
  parameter int unsigned W_BITS    = ann_pkg::W_BITS,
  parameter int unsigned ZETA_BITS = ann_pkg::ZETA_BITS,
  parameter int unsigned SEL_BITS  = $clog2(N_NEURONS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // learning step
  input  logic [ZETA_BITS-1:0]              zeta_in,
  input  logic                              load_zeta,
  output logic [ZETA_BITS-1:0]              zeta_q,
  // forward result register
  input  logic                              test_mode,
  input  logic                              y_capture,
  input  logic [N_NEURONS-1:0]              wta_out,
  input  logic                              test_y_we,
  input  logic                              test_y_d,
  output logic                              y_q,
  // pass control
  input  logic                              start,
  input  logic [SEL_BITS-1:0]               sel,
  input  logic [N_SYN-1:0]                  x,
  input  logic                              target,
  output logic                              done,
  output logic                              corrected,
  // weight memory row port
  output logic [SEL_BITS-1:0]               row_addr,
  input  logic [N_SYN-1:0][W_BITS-1:0]      row_rdata,
  output logic [N_SYN-1:0][W_BITS-1:0]      row_wdata,
  output logic                              row_we
);
  typedef enum logic {O_IDLE, O_CALC} ostate_e;

  ostate_e state;
  logic    err;
  logic    up;

  localparam int unsigned SUM_BITS = (W_BITS > ZETA_BITS ? W_BITS : ZETA_BITS) + 1;
  localparam logic [SUM_BITS-1:0] WMAX = SUM_BITS'((1 << W_BITS) - 1);

  function automatic logic [W_BITS-1:0] step_weight(
      input logic [W_BITS-1:0] w, input logic [ZETA_BITS-1:0] z, input logic inc);
    logic [SUM_BITS-1:0] a, b, s;
    a = SUM_BITS'(w);
    b = SUM_BITS'(z);
    if (inc) begin
      s = a + b;
      if (s > WMAX) s = WMAX;
    end else begin
      s = (a > b) ? a - b : '0;
    end
    return s[W_BITS-1:0];
  endfunction

  always_comb begin
    err = (y_q != target);
    up  = target;                 // d = 1, y = 0: reinforce; else weaken
  end

  always_comb row_addr = sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zeta_q    <= '0;
      y_q       <= 1'b0;
      state     <= O_IDLE;
      done      <= 1'b0;
      corrected <= 1'b0;
      row_we    <= 1'b0;
      row_wdata <= '0;
    end else begin
      done   <= 1'b0;
      row_we <= 1'b0;
      if (load_zeta) zeta_q <= zeta_in;
      if (test_y_we)                   y_q <= test_y_d;
      else if (y_capture && !test_mode) y_q <= wta_out[sel];
      unique case (state)
        O_IDLE: if (start) state <= O_CALC;
        O_CALC: begin
          for (int unsigned j = 0; j < N_SYN; j++)
            row_wdata[j] <= (x[j] && err) ? step_weight(row_rdata[j], zeta_q, up)
                                          : row_rdata[j];
          row_we    <= err;
          corrected <= err;
          done      <= 1'b1;
          state     <= O_IDLE;
        end
        default: state <= O_IDLE;
      endcase
    end
  end
endmodule
