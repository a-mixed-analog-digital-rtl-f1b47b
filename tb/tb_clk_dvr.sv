// tb_clk_dvr: checks that the clock driver passes the generator's phases in
// normal mode and the external phases in test mode, for random patterns.
module tb_clk_dvr;
  logic       test_mode;
  logic [4:0] cgu_phi, ext_phi, phi;
  int checks = 0, failures = 0;

  clk_dvr dut (.test_mode, .cgu_phi, .ext_phi, .phi);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      test_mode = i[0];
      cgu_phi   = 5'($urandom);
      ext_phi   = 5'($urandom);
      #1;
      checks++;
      if (phi !== (i[0] ? ext_phi : cgu_phi)) begin
        failures++;
        $display("FAIL: mode %0d cgu %b ext %b out %b", i[0], cgu_phi, ext_phi, phi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
