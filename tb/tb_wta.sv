// tb_wta: self-checking testbench of the winner-take-all model. For random
// activations and limiter outputs it runs phi4 and phi5 and compares the
// outputs with the set of firing neurons of largest activation, found here.
// Ties (several winners) and the no-winner case are forced and counted, and
// the result must hold until the next phi5.
module tb_wta;
  localparam int N = 20, A = 8;
  logic [4:0] phi = '0;
  logic [N-1:0][A-1:0] act;
  logic [N-1:0] fire, y, exp_y;
  int checks = 0, failures = 0, n_tie = 0, n_none = 0, n_single = 0;

  wta dut (.phi, .act, .fire, .y);

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
    for (int it = 0; it < 400; it++) begin
      int best;
      for (int k = 0; k < N; k++) begin
        act[k]  = A'($urandom_range(0, 150));
        fire[k] = ($urandom_range(0, 3) != 0);
      end
      if (it % 5 == 1) begin act[3] = 8'd200; act[11] = 8'd200; fire[3] = 1; fire[11] = 1; end
      if (it % 5 == 2) fire = '0;
      best = -1;
      for (int k = 0; k < N; k++) if (fire[k] && int'(act[k]) > best) best = int'(act[k]);
      for (int k = 0; k < N; k++) exp_y[k] = fire[k] && int'(act[k]) == best;
      #10 phi[3] = 1; #10 phi[3] = 0;
      #10 phi[4] = 1; #10 phi[4] = 0;
      #5;
      check(y == exp_y, $sformatf("winners %b exp %b", y, exp_y));
      case ($countones(exp_y))
        0: n_none++;
        1: n_single++;
        default: n_tie++;
      endcase
      act = '0; fire = '1;        // inputs change, no phase: output holds
      #10;
      check(y == exp_y, "result holds between phase cycles");
    end
    check(n_tie > 0 && n_none > 0 && n_single > 0, "tie, no winner and single winner seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
