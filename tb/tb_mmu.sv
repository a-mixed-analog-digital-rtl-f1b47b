// tb_mmu: self-checking testbench of the weight memory. It shifts a random
// image of all 800 weight bits in through the scan path (neuron 0, synapse 0,
// LSB first), checks every weight on the parallel output and on the row
// read port, writes random rows through the row port, then shifts a second
// image in while checking that the first one (with the row writes) comes out
// of scan_out bit by bit in the same order. It also checks that a row write
// is ignored while the scan path shifts.
module tb_mmu;
  localparam int N = 20, M = 10, W = 4, T = N * M * W;
  logic clk = 1'b0;
  logic scan_en = 0, scan_in = 0, scan_out, row_we = 0;
  logic [4:0] row_raddr = '0, row_waddr = '0;
  logic [M-1:0][W-1:0] row_rdata, row_wdata = '0;
  logic [N-1:0][M-1:0][W-1:0] weights;
  logic [T-1:0] img_a, img_b, expect_img;
  int checks = 0, failures = 0;

  mmu dut (.clk, .scan_en, .scan_in, .scan_out, .row_raddr, .row_rdata, .row_waddr,
           .row_wdata, .row_we, .weights);

  always #5 clk = ~clk;

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
    for (int i = 0; i < T; i++) begin img_a[i] = 1'($urandom); img_b[i] = 1'($urandom); end
    // serial load of image A
    for (int i = 0; i < T; i++) begin
      @(negedge clk); scan_en = 1'b1; scan_in = img_a[i];
    end
    @(negedge clk); scan_en = 1'b0;
    expect_img = img_a;
    for (int n = 0; n < N; n++)
      for (int s = 0; s < M; s++) begin
        int b;
        b = (n * M + s) * W;
        check(weights[n][s] == expect_img[b +: W], $sformatf("parallel output n%0d s%0d", n, s));
      end
    for (int n = 0; n < N; n++) begin
      row_raddr = 5'(n); #1;
      check(row_rdata == expect_img[n * M * W +: M * W], $sformatf("row read %0d", n));
    end
    // row writes
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      row_waddr = 5'($urandom_range(0, N - 1));
      row_wdata = (M * W)'({$urandom, $urandom});
      row_we = 1'b1;
      expect_img[row_waddr * M * W +: M * W] = row_wdata;
    end
    @(negedge clk); row_we = 1'b0;
    check(weights == expect_img, "row writes land in the right rows");
    // serial load of image B while reading the current contents
    for (int i = 0; i < T; i++) begin
      @(negedge clk);
      check(scan_out == expect_img[i], $sformatf("scan out bit %0d", i));
      scan_en = 1'b1; scan_in = img_b[i];
      row_we = (i == 100);              // ignored while scanning
      row_waddr = 5'd3;
      row_wdata = '1;
    end
    @(negedge clk); scan_en = 1'b0; row_we = 1'b0;
    check(weights == img_b, "second image loaded, row write during scan ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
