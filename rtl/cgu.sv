// cgu: clock generator unit. Produces the five phase clocks phi1..phi5 that
// drive the analog quantifier (ANN) and the winner-take-all (WTA).
//
// The unit runs from its own ANN clock, asynchronously to the master clock,
// as on the published chip. One request yields exactly one phi1..phi5 cycle:
// each phase is high for one ANN clock period and is followed by one period
// in which all phases are low, so the phases never overlap and a full cycle
// takes 2 * N_PHASES = 10 ANN clocks (at a 1 MHz ANN clock, 10 us per pass,
// in line with the estimated 100 K inferences per second).
//
// Interface: a two-phase (toggle) handshake with the controller. Each toggle
// of req (from the master domain, synchronized here) requests one cycle; ack
// is set equal to req after the last phase, so req != ack means busy and no
// release phase is needed between cycles. phi1 rises on the ANN clock edge
// that sees the synchronized request. The phase outputs are registered, so they
// are glitch-free clocks. The phase timing (one period high, one low) and the
// handshake are this design's choices; the document gives only the phase
// count and that the generator runs asynchronously to the master clock.
module cgu #(
  parameter int unsigned N_PHASES = ann_pkg::N_PHASES
) (
  input  logic                ann_clk,
  input  logic                rst_n,
  input  logic                req,     // asynchronous, from the controller
  output logic                ack,     // ann_clk domain, to the controller
  output logic [N_PHASES-1:0] phi      // phi[0] = phi1 ... phi[4] = phi5
);
  localparam int unsigned STEPS = 2 * N_PHASES;
  localparam int unsigned CW    = $clog2(STEPS + 1);

  logic          req_s;
  logic          running;
  logic [CW-1:0] step;

  sync2 u_sync_req (.clk(ann_clk), .rst_n, .d(req), .q(req_s));

  always_ff @(posedge ann_clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      step    <= '0;
      ack     <= 1'b0;
      phi     <= '0;
    end else if (running) begin
      // even steps drive one phase high, odd steps are the gaps
      phi <= '0;
      if (!step[0]) phi[step[CW-1:1]] <= 1'b1;
      if (step == CW'(STEPS - 1)) begin
        running <= 1'b0;
        ack     <= req_s;
      end
      step <= step + 1'b1;
    end else begin
      phi <= '0;
      if (req_s != ack) begin
        // phi1 rises on the edge that sees the new request
        running <= 1'b1;
        phi[0]  <= 1'b1;
        step    <= CW'(1);
      end
    end
  end

  // the phase clocks never overlap
  a_phases_exclusive: assert property (@(posedge ann_clk) disable iff (!rst_n) $onehot0(phi));
endmodule
