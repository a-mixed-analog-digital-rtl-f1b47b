// tb_neuron: self-checking testbench of the quantifier neuron model. For
// random weights, inputs and thresholds it loads the synapse latches, runs
// phases phi1..phi3 and compares the activation with sum_j x_j * w_j and the
// hard-limiter output with act >= theta, computed here, with the threshold
// often placed exactly at the activation or one above it. It also checks that
// an idle neuron stays at zero and that the latches keep their weights when
// ld_w is low.
module tb_neuron;
  localparam int M = 10, W = 4, A = 8;
  logic clk = 1'b0, ld_w = 0, phi1 = 0, phi2 = 0, phi3 = 0, en = 1;
  logic [M-1:0][W-1:0] w_in, w_ref;
  logic [M-1:0] x;
  logic [A-1:0] theta, act;
  logic fire;
  int checks = 0, failures = 0, n_fire = 0, n_quiet = 0;

  neuron dut (.clk, .ld_w, .w_in, .phi1, .phi2, .phi3, .en, .x, .theta, .act, .fire);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic phases();
    #20 phi1 = 1; #10 phi1 = 0;
    #10 phi2 = 1; #10 phi2 = 0;
    #10 phi3 = 1; #10 phi3 = 0;
    #10;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      int sum;
      if (it % 4 == 0) begin
        w_ref = (M * W)'({$urandom, $urandom});
        w_in = w_ref;
        @(negedge clk); ld_w = 1; @(negedge clk); ld_w = 0;
      end
      w_in = (M * W)'({$urandom, $urandom});   // not loaded
      x = M'($urandom);
      en = (it % 7 != 3);
      sum = 0;
      for (int j = 0; j < M; j++) if (x[j]) sum += int'(w_ref[j]);
      if (!en) sum = 0;
      // every third vector puts the threshold exactly at, or one above, the sum
      case (it % 3)
        0: theta = A'(sum);
        1: theta = A'(sum + 1);
        default: theta = A'($urandom_range(0, 100));
      endcase
      phases();
      check(int'(act) == sum, $sformatf("act %0d exp %0d", act, sum));
      check(fire == (en && sum >= int'(theta)), "hard limiter");
      if (fire) n_fire++; else n_quiet++;
    end
    check(n_fire > 20 && n_quiet > 20, "both limiter outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
