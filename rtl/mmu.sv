// mmu: multipurpose memory unit, the store of all synaptic weights
// (N_NEURONS x N_SYN x W_BITS = 800 bits on the published chip).
//
// It is built as a scan path with serial and parallel access:
//  * serial: while scan_en is high, the whole store shifts by one bit per
//    clk. scan_in enters at the top bit (last neuron, last synapse, MSB) and
//    scan_out shows bit 0 (neuron 0, synapse 0, LSB), so a supervisor shifts
//    in a full image LSB first starting with neuron 0, synapse 0, and reads
//    the old image out in the same order. Feeding scan_out back to scan_in
//    reads the store without destroying it.
//  * parallel row port: the training unit reads one neuron's row
//    combinationally (row_raddr) and writes it on a clk edge (row_we).
//  * parallel output: every weight is visible on weights, from which the
//    synapse latches of the analog section are loaded.
// Scan has priority over a row write. The store has no reset: it is loaded
// by scan before use. Bit order and priority are this design's choices; the
// document gives the scan-path structure and the serial/parallel access.
module mmu #(
  parameter int unsigned N_NEURONS = ann_pkg::N_NEURONS,
  parameter int unsigned N_SYN     = ann_pkg::N_SYN,
  parameter int unsigned W_BITS    = ann_pkg::W_BITS,
  parameter int unsigned SEL_BITS  = $clog2(N_NEURONS)
) (
  input  logic                                       clk,
  // serial scan path
  input  logic                                       scan_en,
  input  logic                                       scan_in,
  output logic                                       scan_out,
  // parallel row port (training unit)
  input  logic [SEL_BITS-1:0]                        row_raddr,
  output logic [N_SYN-1:0][W_BITS-1:0]               row_rdata,
  input  logic [SEL_BITS-1:0]                        row_waddr,
  input  logic [N_SYN-1:0][W_BITS-1:0]               row_wdata,
  input  logic                                       row_we,
  // parallel output (synapse latches)
  output logic [N_NEURONS-1:0][N_SYN-1:0][W_BITS-1:0] weights
);
  localparam int unsigned TOTAL = N_NEURONS * N_SYN * W_BITS;

  logic [N_NEURONS-1:0][N_SYN-1:0][W_BITS-1:0] store;

  logic [TOTAL-1:0] flat;

  always_comb begin
    flat      = store;
    scan_out  = flat[0];
    row_rdata = store[row_raddr];
    weights   = store;
  end

  always_ff @(posedge clk) begin
    if (scan_en)
      store <= {scan_in, flat[TOTAL-1:1]};
    else if (row_we)
      store[row_waddr] <= row_wdata;
  end
endmodule
