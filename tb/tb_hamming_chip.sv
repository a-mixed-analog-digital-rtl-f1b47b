// tb_hamming_chip: end-to-end testbench of the whole chip at its default
// size (20 neurons, 10 synapses, 4-bit weights), with the testbench acting as
// the external supervisor. Time units stand for nanoseconds: master clock
// 10 MHz, ANN clock 1 MHz, the clock rates the chip's speed estimate assumes.
//
// The testbench keeps its own copy of every weight and its own model of the
// network (activation = sum of weights on active inputs, limiter
// act >= theta, winners = firing neurons of largest activation) and of the
// learning rule, and checks the chip against them:
//   1. scan in a uniform image, ld_inits, forward pass: every neuron ties;
//      forward pass with zero input: no winner
//   2. scan in random initial weights (reading the previous image back out)
//   3. training, as in the published algorithm study: nine 3x3 pixel
//      patterns on nine neurons, each neuron trained in turn with the
//      supervisor deciding convergence from the corrected flag; every pass is
//      checked (corrected flag, forward result register) against the model
//   4. forward classification of the nine patterns and of every one-pixel
//      noisy version; every result is compared with the model, and the
//      noiseless patterns must all be recognised
//   5. scan the trained image out and compare it with the model's weights
//   6. test mode: phases from the pins through the clock driver; forward
//      result register written and read from outside; the stand-alone test
//      neuron
// The number of times each mechanism happened is counted, and a mechanism
// that never happened counts as a failure. The forward-pass latency is
// checked against the phase-cycle length (10 ANN clocks) plus the clock
// domain crossings.
module tb_hamming_chip;
  import ann_pkg::*;
  localparam int N = N_NEURONS, M = N_SYN, W = W_BITS, A = ACT_BITS;
  localparam int T = N * M * W;
  localparam int NPAT = 9;
  localparam int TCLK = 100, TANN = 1000;

  logic clk = 1'b0, ann_clk = 1'b0, rst_n = 1'b0;
  logic ld_inits = 0, start = 0, train_mode = 0, target = 0, load_zeta = 0;
  logic [4:0] train_sel = '0;
  logic [M-1:0] data = '0;
  logic [A-1:0] theta = '0;
  logic [ZETA_BITS-1:0] zeta = '0, test_zeta_q;
  logic done, busy, corrected;
  logic [N-1:0] result;
  logic scan_en = 0, scan_in = 0, scan_out;
  logic test_mode = 0, test_y_we = 0, test_y_d = 0, test_y_q;
  logic [N_PHASES-1:0] test_phi = '0;
  logic tn_ld_w = 0, tn_phi1 = 0, tn_phi2 = 0, tn_phi3 = 0;
  logic [M-1:0][W-1:0] tn_w = '0;
  logic [M-1:0] tn_x = '0;
  logic [A-1:0] tn_theta = '0, tn_act;
  logic tn_fire;

  hamming_chip dut (.*);

  always #(TCLK / 2) clk = ~clk;
  always #(TANN / 2) ann_clk = ~ann_clk;

  int checks = 0, failures = 0;
  int wm [N][M];                        // the supervisor's copy of the weights
  int zeta_v = 0;
  // mechanism counters
  int n_fwd = 0, n_train = 0, n_inc = 0, n_dec = 0, n_nocorr = 0, n_sat = 0;
  int n_tie = 0, n_none = 0, n_scan_load = 0, n_scan_read = 0, n_init = 0;
  int n_zeta = 0, n_testphase = 0, n_testy = 0, n_tn = 0, n_single = 0;
  int max_lat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reference model ------------------------------------------------------
  function automatic int act_of(int n, logic [M-1:0] x);
    int s = 0;
    for (int j = 0; j < M; j++) if (x[j]) s += wm[n][j];
    return s;
  endfunction

  function automatic logic [N-1:0] winners(logic [M-1:0] x, int th, logic [N-1:0] en);
    int best = -1;
    logic [N-1:0] f, r;
    for (int n = 0; n < N; n++) begin
      f[n] = en[n] && act_of(n, x) >= th;
      if (f[n] && act_of(n, x) > best) best = act_of(n, x);
    end
    for (int n = 0; n < N; n++) r[n] = f[n] && act_of(n, x) == best;
    return r;
  endfunction

  function automatic logic [T-1:0] image_of_model();
    logic [T-1:0] img;
    for (int n = 0; n < N; n++)
      for (int j = 0; j < M; j++) img[(n * M + j) * W +: W] = W'(wm[n][j]);
    return img;
  endfunction

  // ---- supervisor actions -----------------------------------------------------
  task automatic scan_image(input logic [T-1:0] img, output logic [T-1:0] old_img);
    for (int i = 0; i < T; i++) begin
      @(negedge clk);
      old_img[i] = scan_out;
      scan_en = 1'b1;
      scan_in = img[i];
    end
    @(negedge clk);
    scan_en = 1'b0;
    for (int n = 0; n < N; n++)
      for (int j = 0; j < M; j++) wm[n][j] = int'(img[(n * M + j) * W +: W]);
    n_scan_load++;
  endtask

  task automatic do_init();
    @(negedge clk); ld_inits = 1'b1;
    @(negedge clk); ld_inits = 1'b0;
    repeat (3) @(negedge clk);
    n_init++;
  endtask

  task automatic set_zeta(input int z);
    @(negedge clk); zeta = ZETA_BITS'(z); load_zeta = 1'b1;
    @(negedge clk); load_zeta = 1'b0;
    zeta_v = z;
    check(int'(test_zeta_q) == z, "learning step readable");
    n_zeta++;
  endtask

  task automatic run_pass(input bit tm, input int sel, input bit d, input logic [M-1:0] x,
                          output int lat);
    @(negedge clk);
    data = x; train_mode = tm; train_sel = 5'(sel); target = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 1000) begin @(negedge clk); lat++; end
    check(done, "pass ends with done");
  endtask

  task automatic forward(input logic [M-1:0] x, input int th, output logic [N-1:0] got,
                         output logic [N-1:0] expv);
    int lat;
    theta = A'(th);
    run_pass(1'b0, 0, 1'b0, x, lat);
    if (lat > max_lat) max_lat = lat;
    got  = result;
    expv = winners(x, th, '1);
    check(got == expv, $sformatf("forward x=%b: winners %b expected %b", x, got, expv));
    case ($countones(got))
      0: n_none++;
      1: n_single++;
      default: n_tie++;
    endcase
    n_fwd++;
  endtask

  // one training pass on neuron sel; returns whether a correction was applied
  task automatic train(input int sel, input bit d, input logic [M-1:0] x, input int th,
                       output bit corr);
    int lat, a, v;
    bit y;
    theta = A'(th);
    a = act_of(sel, x);
    y = (a >= th);
    run_pass(1'b1, sel, d, x, lat);
    check(test_y_q == y, $sformatf("training forward result n%0d", sel));
    check(result == (N'(y) << sel), "training: only the selected neuron can win");
    corr = (y != d);
    check(corrected == corr, $sformatf("corrected flag n%0d d=%0d y=%0d", sel, d, y));
    if (corr) begin
      if (d) n_inc++; else n_dec++;
      for (int j = 0; j < M; j++) if (x[j]) begin
        v = d ? wm[sel][j] + zeta_v : wm[sel][j] - zeta_v;
        if (v > W_MAX_I) begin v = W_MAX_I; n_sat++; end
        if (v < 0) begin v = 0; n_sat++; end
        wm[sel][j] = v;
      end
    end else n_nocorr++;
    n_train++;
  endtask

  localparam int W_MAX_I = (1 << W) - 1;

  // 3x3 pixel patterns, bit 3*row+col; three pixels each, any two share at
  // most one pixel: three rows, three columns, two diagonals and one bent line
  localparam logic [8:0] PAT [NPAT] = '{
    9'b000_000_111, 9'b000_111_000, 9'b111_000_000,
    9'b001_001_001, 9'b010_010_010, 9'b100_100_100,
    9'b100_010_001, 9'b001_010_100, 9'b010_100_001
  };

  initial begin
    #(64'd400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [T-1:0] img, old_img;
    logic [N-1:0] got, expv;
    bit corr, any;
    int epochs, correct_noisy, total_noisy;

    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // 1. uniform weights: every neuron ties; zero input: no winner
    img = '0;
    for (int n = 0; n < N; n++) for (int j = 0; j < M; j++) img[(n * M + j) * W +: W] = 4'd5;
    scan_image(img, old_img);
    do_init();
    forward(10'b0000010011, 1, got, expv);
    check(got == '1, "uniform weights: all neurons tie");
    forward(10'b0, 1, got, expv);
    check(got == '0, "zero input: no winner");
    check(max_lat * TCLK <= 14 * TANN && max_lat * TCLK >= 10 * TANN,
          $sformatf("forward pass latency %0d ns", max_lat * TCLK));

    // 2. random initial weights; read the uniform image back while loading
    for (int i = 0; i < T; i++) img[i] = 1'($urandom);
    for (int n = 0; n < N; n++) for (int j = 0; j < M; j++)
      if (n >= NPAT || j >= 9) img[(n * M + j) * W +: W] = 4'd0;
    begin
      logic [T-1:0] uni;
      uni = image_of_model();
      scan_image(img, old_img);
      check(old_img == uni, "scan path reads back the previous image");
      n_scan_read++;
    end
    do_init();

    // 3. training: neuron k learns PAT[k]
    set_zeta(3);
    for (int k = 0; k < NPAT; k++) begin
      epochs = 0;
      do begin
        any = 0;
        for (int p = 0; p < NPAT; p++) begin
          train(k, p == k, 10'(PAT[p]), 36, corr);
          any |= corr;
        end
        epochs++;
        if (epochs == 4) set_zeta(1);       // finer steps once close
      end while (any && epochs < 40);
      check(!any, $sformatf("neuron %0d converged in %0d epochs", k, epochs));
      set_zeta(3);
    end

    // 4. classification, noiseless and one-pixel noise
    for (int p = 0; p < NPAT; p++) begin
      forward(10'(PAT[p]), 1, got, expv);
      check(got == N'(1) << p, $sformatf("pattern %0d recognised", p));
    end
    correct_noisy = 0; total_noisy = 0;
    for (int p = 0; p < NPAT; p++)
      for (int b = 0; b < 9; b++) begin
        forward(10'(PAT[p] ^ (9'd1 << b)), 1, got, expv);
        total_noisy++;
        if (got == N'(1) << p) correct_noisy++;
      end
    $display("one-pixel noisy patterns classified correctly: %0d of %0d", correct_noisy, total_noisy);

    // 5. trained weights out through the scan path (loop back keeps them)
    img = image_of_model();
    scan_image(img, old_img);
    check(old_img == img, "trained weights read out match the model");
    n_scan_read++;

    // 6a. test mode: phases from the pins
    @(negedge clk);
    test_mode = 1'b1;
    data = 10'(PAT[4]); theta = 8'd1;
    for (int ph = 0; ph < N_PHASES; ph++) begin
      #(TANN) test_phi[ph] = 1'b1;
      #(TANN) test_phi[ph] = 1'b0;
    end
    #(TANN);
    check(result == winners(10'(PAT[4]), 1, '1), "test mode: external phases drive the analog core");
    n_testphase++;
    // 6b. forward result register written and read from the pins
    for (int v = 0; v < 2; v++) begin
      @(negedge clk); test_y_d = 1'(v); test_y_we = 1'b1;
      @(negedge clk); test_y_we = 1'b0;
      check(test_y_q == 1'(v), "result register written from outside");
      n_testy++;
    end
    test_mode = 1'b0;
    // 6c. stand-alone test neuron
    for (int it = 0; it < 20; it++) begin
      int s;
      for (int j = 0; j < M; j++) tn_w[j] = W'($urandom);
      tn_x = M'($urandom); tn_theta = A'($urandom_range(0, 80));
      @(negedge clk); tn_ld_w = 1'b1; @(negedge clk); tn_ld_w = 1'b0;
      #100 tn_phi1 = 1; #100 tn_phi1 = 0;
      #100 tn_phi2 = 1; #100 tn_phi2 = 0;
      #100 tn_phi3 = 1; #100 tn_phi3 = 0;
      s = 0;
      for (int j = 0; j < M; j++) if (tn_x[j]) s += int'(tn_w[j]);
      check(int'(tn_act) == s && tn_fire == (s >= int'(tn_theta)), "test neuron");
      n_tn++;
    end

    // mechanisms
    $display("forward=%0d train=%0d increase=%0d decrease=%0d no_correction=%0d saturate=%0d",
             n_fwd, n_train, n_inc, n_dec, n_nocorr, n_sat);
    $display("tie=%0d single=%0d none=%0d scan_load=%0d scan_read=%0d init=%0d zeta=%0d",
             n_tie, n_single, n_none, n_scan_load, n_scan_read, n_init, n_zeta);
    $display("test_phases=%0d test_result_reg=%0d test_neuron=%0d max_forward_latency=%0d ns",
             n_testphase, n_testy, n_tn, max_lat * TCLK);
    check(n_fwd > 0 && n_train > 0 && n_inc > 0 && n_dec > 0 && n_nocorr > 0 && n_sat > 0,
          "every learning mechanism happened");
    check(n_tie > 0 && n_single > 0 && n_none > 0, "tie, single and no winner happened");
    check(n_scan_load > 0 && n_scan_read > 0 && n_init > 1 && n_zeta > 0,
          "scan, initialization and learning-step load happened");
    check(n_testphase > 0 && n_testy > 0 && n_tn > 0, "test features exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
