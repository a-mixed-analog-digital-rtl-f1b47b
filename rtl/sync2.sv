// sync2: two-flop synchronizer for a single level signal that crosses into
// the clock domain of clk. Used on the request/acknowledge pair between the
// master-clock controller and the phase clock generator, which runs from its
// own ANN clock. Output follows the input two rising edges of clk later;
// reset clears both stages. The published design only states that the two
// clocks are asynchronous; this synchronizer is this design's choice.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
