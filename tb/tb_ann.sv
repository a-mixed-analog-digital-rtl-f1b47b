// tb_ann: self-checking testbench of the quantifier array. Random weights for
// all neurons are presented on the weight bus and loaded with ld_w; for
// random inputs, thresholds and enable masks one phi1..phi3 sequence is run
// and every neuron's activation and limiter output are compared with sums
// computed here. Idle neurons must read zero.
module tb_ann;
  localparam int N = 20, M = 10, W = 4, A = 8;
  logic clk = 1'b0, ld_w = 0;
  logic [N-1:0][M-1:0][W-1:0] weights, w_ref;
  logic [4:0] phi = '0;
  logic [N-1:0] neuron_en, fire;
  logic [M-1:0] x;
  logic [A-1:0] theta;
  logic [N-1:0][A-1:0] act;
  int checks = 0, failures = 0;

  ann dut (.clk, .ld_w, .weights, .phi, .neuron_en, .x, .theta, .act, .fire);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 60; it++) begin
      if (it % 5 == 0) begin
        for (int n = 0; n < N; n++) for (int s = 0; s < M; s++) w_ref[n][s] = W'($urandom);
        weights = w_ref;
        @(negedge clk); ld_w = 1; @(negedge clk); ld_w = 0;
        for (int n = 0; n < N; n++) for (int s = 0; s < M; s++) weights[n][s] = W'($urandom);
      end
      x = M'($urandom);
      theta = A'($urandom_range(10, 80));
      neuron_en = (it % 3 == 0) ? N'(1) << (it % N) : '1;
      for (int p = 0; p < 3; p++) begin #10 phi[p] = 1; #10 phi[p] = 0; end
      #5;
      for (int n = 0; n < N; n++) begin
        int sum;
        sum = 0;
        for (int s = 0; s < M; s++) if (x[s]) sum += int'(w_ref[n][s]);
        if (!neuron_en[n]) sum = 0;
        check(int'(act[n]) == sum, $sformatf("neuron %0d act %0d exp %0d", n, act[n], sum));
        check(fire[n] == (neuron_en[n] && sum >= int'(theta)), $sformatf("neuron %0d fire", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
