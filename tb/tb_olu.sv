// tb_olu: self-checking testbench of the error-correction training unit.
// A small array in the testbench plays the weight memory. For random rows,
// input vectors, targets, forward results and learning steps it checks the
// written row against an independent model of the update rule (+zeta on
// active inputs when d=1,y=0; -zeta when d=0,y=1; saturating at 0 and 15),
// that nothing is written when d = y, the corrected flag, that done comes
// two clocks after start, and the forward result register: captured from the
// selected WTA output, writable and readable from the test port, and not
// overwritten by a capture in test mode.
module tb_olu;
  localparam int N = 20, M = 10, W = 4, Z = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [Z-1:0] zeta_in = '0, zeta_q;
  logic load_zeta = 0, test_mode = 0, y_capture = 0, test_y_we = 0, test_y_d = 0, y_q;
  logic [N-1:0] wta_out = '0;
  logic start = 0, target = 0, done, corrected, row_we;
  logic [4:0] sel = '0, row_addr;
  logic [M-1:0] x = '0;
  logic [M-1:0][W-1:0] row_rdata, row_wdata;
  logic [M-1:0][W-1:0] mem [N];
  int checks = 0, failures = 0, n_up = 0, n_down = 0, n_sat = 0;

  olu dut (.clk, .rst_n, .zeta_in, .load_zeta, .zeta_q, .test_mode, .y_capture, .wta_out,
           .test_y_we, .test_y_d, .y_q, .start, .sel, .x, .target, .done, .corrected,
           .row_addr, .row_rdata, .row_wdata, .row_we);

  always #5 clk = ~clk;
  always_comb row_rdata = mem[row_addr];
  always_ff @(posedge clk) if (row_we) mem[row_addr] <= row_wdata;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) mem[i][j] = W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      logic [M-1:0][W-1:0] old_row, exp_row;
      logic yv, use_test;
      int cyc, v;
      // learning step
      if (it % 10 == 0) begin
        zeta_in = Z'($urandom_range(1, 15)); load_zeta = 1'b1;
        @(negedge clk); load_zeta = 1'b0;
        check(zeta_q == zeta_in, "zeta loaded");
      end
      sel = 5'($urandom_range(0, N - 1));
      x = M'($urandom);
      target = 1'($urandom);
      yv = 1'($urandom);
      use_test = (it % 3 == 0);
      // forward result: from the WTA outputs, or written from the test port
      wta_out = N'($urandom);
      wta_out[sel] = yv;
      if (use_test) begin
        test_mode = 1'b1;
        test_y_d = yv; test_y_we = 1'b1; @(negedge clk); test_y_we = 1'b0;
        wta_out[sel] = !yv;             // must be ignored in test mode
      end
      y_capture = 1'b1; start = 1'b1;
      @(negedge clk);
      y_capture = 1'b0; start = 1'b0;
      check(y_q == yv, "forward result register");
      old_row = mem[sel];
      for (int j = 0; j < M; j++) begin
        v = old_row[j];
        if (x[j] && target && !yv) begin v = v + int'(zeta_q); if (v > 15) begin v = 15; n_sat++; end end
        if (x[j] && !target && yv) begin v = v - int'(zeta_q); if (v < 0) begin v = 0; n_sat++; end end
        exp_row[j] = W'(v);
      end
      if (target && !yv && x != 0) n_up++;
      if (!target && yv && x != 0) n_down++;
      cyc = 1;
      while (!done && cyc < 20) begin @(negedge clk); cyc++; end
      check(done && cyc == 2, $sformatf("done two clocks after start (%0d)", cyc));
      check(corrected == (target != yv), "corrected flag");
      check(row_we == (target != yv), "row written only on an error");
      @(negedge clk);
      check(mem[sel] == exp_row, $sformatf("row %0d: old %h got %h exp %h x %b d %b y %b z %0d", sel, old_row, mem[sel], exp_row, x, target, yv, zeta_q));
      test_mode = 1'b0;
    end
    check(n_up > 10 && n_down > 10 && n_sat > 10, "increase, decrease and saturation all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
