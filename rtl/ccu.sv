// ccu: chip control unit, the master controller. It implements the
// supervisor protocol and sequences every other unit:
//
//   ld_inits              -> pulse ld_w (weights from the memory unit into the
//                            synapse latches), then wait for start
//   start, forward mode   -> all neurons enabled, one phi1..phi5 cycle from the
//                            clock generator, then done (result valid)
//   start, training mode  -> only neuron train_sel enabled, one phase cycle
//                            (forward pass), y_capture, then the training unit
//                            computes and writes the new weights
//                            (back-propagation pass), ld_w, then done
//
// This order is the one of the published control-signal table and timing
// diagram. The state encoding, the level-type done (high from the end of a
// pass until the next start or ld_inits), ignoring start before the first
// ld_inits, and the toggle handshake with the clock generator are this
// design's choices. A phase cycle is requested by inverting cgu_req and is
// over when cgu_ack, synchronized here from the ANN clock domain, equals
// cgu_req again.
//
// Inputs start, ld_inits, train_mode, train_sel are sampled on the rising
// edge of clk; train_mode and train_sel are latched at start.
module ccu #(
  parameter int unsigned N_NEURONS = ann_pkg::N_NEURONS,
  parameter int unsigned SEL_BITS  = $clog2(N_NEURONS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // supervisor side
  input  logic                 ld_inits,
  input  logic                 start,
  input  logic                 train_mode,
  input  logic [SEL_BITS-1:0]  train_sel,
  output logic                 done,
  output logic                 busy,
  // clock generator
  output logic                 cgu_req,
  input  logic                 cgu_ack,
  // analog section
  output logic                 ld_w,
  output logic [N_NEURONS-1:0] neuron_en,
  // training unit
  output logic                 y_capture,
  output logic                 olu_start,
  input  logic                 olu_done,
  output logic [SEL_BITS-1:0]  sel
);
  typedef enum logic [3:0] {
    S_WAIT_INIT,  // after reset: nothing until ld_inits
    S_LOAD_INIT,  // ld_w pulse of the initialization sequence
    S_READY,      // waiting for start
    S_CGU_REQ,    // request one phase cycle
    S_CGU_RUN,    // phase cycle in progress
    S_CAPTURE,    // training: latch the forward result
    S_OLU_RUN,    // training: error correction in progress
    S_LOAD_NEW,   // training: ld_w pulse with the new weights
    S_FINISH
  } state_e;

  state_e state;
  logic   ack_s;
  logic   train_q;

  sync2 u_sync_ack (.clk, .rst_n, .d(cgu_ack), .q(ack_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_WAIT_INIT;
      done      <= 1'b0;
      cgu_req   <= 1'b0;
      ld_w      <= 1'b0;
      y_capture <= 1'b0;
      olu_start <= 1'b0;
      train_q   <= 1'b0;
      sel       <= '0;
      neuron_en <= '0;
    end else begin
      ld_w      <= 1'b0;
      y_capture <= 1'b0;
      olu_start <= 1'b0;
      unique case (state)
        S_WAIT_INIT: if (ld_inits) begin
          done  <= 1'b0;
          ld_w  <= 1'b1;
          state <= S_LOAD_INIT;
        end
        S_LOAD_INIT: state <= S_READY;
        S_READY: begin
          if (ld_inits) begin
            done  <= 1'b0;
            ld_w  <= 1'b1;
            state <= S_LOAD_INIT;
          end else if (start) begin
            done    <= 1'b0;
            train_q <= train_mode;
            sel     <= train_sel;
            for (int unsigned i = 0; i < N_NEURONS; i++)
              neuron_en[i] <= !train_mode || (SEL_BITS'(i) == train_sel);
            state   <= S_CGU_REQ;
          end
        end
        S_CGU_REQ: begin
          cgu_req <= !cgu_req;
          state   <= S_CGU_RUN;
        end
        S_CGU_RUN: if (ack_s == cgu_req) state <= train_q ? S_CAPTURE : S_FINISH;
        S_CAPTURE: begin
          y_capture <= 1'b1;
          olu_start <= 1'b1;
          state     <= S_OLU_RUN;
        end
        S_OLU_RUN: if (olu_done) begin
          ld_w  <= 1'b1;
          state <= S_LOAD_NEW;
        end
        S_LOAD_NEW: state <= S_FINISH;
        S_FINISH: begin
          done  <= 1'b1;
          state <= S_READY;
        end
        default: state <= S_WAIT_INIT;
      endcase
    end
  end

  // the training unit only reports completion of a pass the controller started
  a_olu_done_expected: assert property (@(posedge clk) disable iff (!rst_n)
    olu_done |-> state == S_OLU_RUN);
  // start and ld_inits are single requests, not both at once
  a_start_xor_init: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && ld_inits));

  always_comb busy = !(state inside {S_WAIT_INIT, S_READY});

endmodule
