// tb_ccu: self-checking testbench of the chip controller. The clock
// generator and the training unit are replaced by simple responders: ack
// follows each toggle of req after a fixed delay, olu_done comes a few clocks
// after olu_start. The testbench counts the controller's pulses and checks
// the sequences of the protocol: start is ignored before ld_inits;
// ld_inits gives one ld_w; a forward pass enables all neurons, requests one
// phase cycle, starts no training and ends with done; a training pass
// enables only the selected neuron, then y_capture and olu_start, then ld_w
// after olu_done, then done; done falls at the next start.
module tb_ccu;
  localparam int N = 20;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         ld_inits = 0, start = 0, train_mode = 0;
  logic [4:0]   train_sel = 0;
  logic         done, busy, cgu_req, cgu_ack, ld_w, y_capture, olu_start, olu_done;
  logic [N-1:0] neuron_en;
  logic [4:0]   sel;
  int checks = 0, failures = 0;
  int n_req = 0, n_ldw = 0, n_cap = 0, n_olu = 0;
  int olu_cnt;

  ccu dut (.clk, .rst_n, .ld_inits, .start, .train_mode, .train_sel, .done, .busy,
           .cgu_req, .cgu_ack, .ld_w, .neuron_en, .y_capture, .olu_start, .olu_done, .sel);

  always #5 clk = ~clk;

  // clock generator stand-in: ack follows each toggle of req 6 clocks later
  logic [7:0] req_dly;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_dly <= '0;
      cgu_ack <= 1'b0;
    end else begin
      req_dly <= {req_dly[6:0], cgu_req};
      if (req_dly[5] != cgu_ack && req_dly[5] == cgu_req) begin
        cgu_ack <= req_dly[5];
        n_req++;
      end
    end
  end

  // training unit stand-in
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      olu_done <= 1'b0;
      olu_cnt  <= 0;
    end else begin
      olu_done <= 1'b0;
      if (olu_start) begin olu_cnt <= 3; n_olu++; end
      else if (olu_cnt == 1) begin olu_done <= 1'b1; olu_cnt <= 0; end
      else if (olu_cnt > 1) olu_cnt <= olu_cnt - 1;
      if (ld_w) n_ldw++;
      if (y_capture) n_cap++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_start(input bit tm, input logic [4:0] s);
    @(negedge clk);
    train_mode = tm; train_sel = s; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  task automatic wait_done(output int cycles);
    cycles = 0;
    while (!done && cycles < 500) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // start before initialization is ignored
    pulse_start(1'b0, 5'd0);
    repeat (20) @(negedge clk);
    check(n_req == 0 && !done && !busy, "start ignored before ld_inits");
    // initialization
    @(negedge clk); ld_inits = 1'b1; @(negedge clk); ld_inits = 1'b0;
    repeat (5) @(negedge clk);
    check(n_ldw == 1, "ld_inits gives one ld_w");
    check(!busy, "ready after init");
    // forward passes
    for (int p = 0; p < 3; p++) begin
      pulse_start(1'b0, 5'(p));
      check(busy && !done, "busy, done cleared at start");
      check(neuron_en == '1, "forward: all neurons enabled");
      wait_done(cyc);
      check(done, "forward pass ends with done");
      check(n_req == p + 1, "one phase cycle per forward pass");
      check(n_olu == 0 && n_cap == 0 && n_ldw == 1, "forward: no training, no reload");
      repeat (3) @(negedge clk);
      check(done, "done holds");
    end
    // training passes
    for (int p = 0; p < 4; p++) begin
      logic [4:0] s;
      s = 5'($urandom_range(0, N - 1));
      pulse_start(1'b1, s);
      check(neuron_en == N'(1) << s && sel == s, $sformatf("training: only neuron %0d enabled", s));
      wait_done(cyc);
      check(done, "training pass ends with done");
      check(n_req == 4 + p, $sformatf("one phase cycle per training pass %0d", n_req));
      check(n_cap == p + 1 && n_olu == p + 1, "training: capture and error-correction start");
      check(n_ldw == 2 + p, "training: new weights loaded");
    end
    // re-initialization
    @(negedge clk); ld_inits = 1'b1; @(negedge clk); ld_inits = 1'b0;
    repeat (3) @(negedge clk);
    check(n_ldw == 6 && !done, "second ld_inits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
