// tb_sirf_tdc_ctrl: for several sample counts and capture delays, checks the
// order of strobes within each sample (launch, CAPTURE_DLY cycles, capture,
// disable, clear), the number of samples and the total cycle count
// 2^n * (CAPTURE_DLY + 4) + 1 from start to done.
module tb_sirf_tdc_ctrl;
  localparam int DLY = 3;
  logic clk = 0, rst_n = 1, start = 0;
  logic [3:0] samples_log2;
  logic launch_set, launch_clr, sr_disable, capture, busy, done;
  int checks = 0, failures = 0;

  sirf_tdc_ctrl #(.CAPTURE_DLY(DLY)) dut (.clk, .rst_n, .start, .samples_log2,
    .launch_set, .launch_clr, .sr_disable, .capture, .busy, .done);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #12 rst_n = 1;
    for (int n = 0; n <= 5; n++) begin
      int cyc, launches, t_launch, t_cap, ncap, ndis, nclr;
      samples_log2 = 4'(n);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1; launches = 0; ncap = 0; ndis = 0; nclr = 0; t_launch = -100; t_cap = -100;
      while (!done && cyc < 10000) begin
        chk($onehot0({launch_set, launch_clr, sr_disable, capture}), "one strobe at a time");
        if (launch_set) begin launches++; t_launch = cyc; end
        if (capture) begin ncap++; t_cap = cyc; chk(cyc - t_launch == DLY + 1, "capture delay"); end
        if (sr_disable) ndis++;
        if (launch_clr) nclr++;
        if (sr_disable) chk(cyc == t_cap + 1, "disable after capture");
        if (launch_clr) chk(cyc == t_cap + 2, "clear after disable");
        @(negedge clk); cyc++;
      end
      chk(launches == (1 << n), $sformatf("launch count %0d", launches));
      chk(ncap == (1 << n), "capture count");
      chk(ndis == (1 << n), $sformatf("disable count %0d", ndis));
      chk(nclr == (1 << n), $sformatf("clear count %0d", nclr));
      chk(cyc == (1 << n) * (DLY + 4) + 1, $sformatf("cycles %0d", cyc));
      @(negedge clk);
      chk(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
