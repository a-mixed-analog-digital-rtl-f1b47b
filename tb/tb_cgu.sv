// tb_cgu: self-checking testbench of the phase clock generator. For several
// requests it records the phase vector every ANN clock and checks that
// exactly one phase is high at a time, that phi1..phi5 appear once each and
// in order, each for one clock with one idle clock after it (10 clocks per
// cycle), that phi1 follows a request (a toggle of req) within the
// synchronizer delay, that ack equals req again after phi5, and that no phase
// moves without a request.
module tb_cgu;
  logic       ann_clk = 1'b0;
  logic       rst_n   = 1'b0;
  logic       req     = 1'b0;
  logic       ack;
  logic [4:0] phi;
  int checks = 0, failures = 0;

  cgu dut (.ann_clk, .rst_n, .req, .ack, .phi);

  always #5 ann_clk = ~ann_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] trace [$];
    int first_high;
    repeat (3) @(posedge ann_clk);
    rst_n = 1'b1;
    // idle: no phase without request
    repeat (20) begin
      @(negedge ann_clk);
      check(phi == 5'b0 && ack == req, "idle phases low");
    end
    for (int pass = 0; pass < 4; pass++) begin
      @(negedge ann_clk);
      req = !req;
      trace.delete();
      while (ack != req) begin
        @(negedge ann_clk);
        trace.push_back(phi);
        check($countones(phi) <= 1, "phases do not overlap");
        if (trace.size() > 40) break;
      end
      first_high = -1;
      foreach (trace[i]) if (first_high < 0 && trace[i] != 0) first_high = i;
      check(first_high >= 0, "a phase was seen");
      for (int k = 0; k < 10; k++) begin
        int idx;
        logic [4:0] exp_v;
        idx   = first_high + k;
        exp_v = (k % 2 == 0) ? 5'(1 << (k / 2)) : 5'b0;
        check(idx < trace.size() && trace[idx] == exp_v,
              $sformatf("pass %0d step %0d phase vector", pass, k));
      end
      // ack comes right after the last gap: nothing after the 10 steps
      check(trace.size() == first_high + 10, $sformatf("cycle length, trace %0d", trace.size()));
      check(first_high <= 2, "phi1 within three ANN clocks of the request");
      // no new request: no further cycle
      repeat (15) begin
        @(negedge ann_clk);
        check(phi == 5'b0 && ack == req, "one cycle per request");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
