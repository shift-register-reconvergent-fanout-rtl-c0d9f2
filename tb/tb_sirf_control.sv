// tb_sirf_control: the sequencer against engine stand-ins that answer after
// random delays. Checks the DV index sequence 0..N_DV-1 with one
// measurement per index, that no engine starts before the previous one is
// done, the order timing -> difference -> calibration -> bit generation,
// and that do_timing = 0 skips the timing phase.
module tb_sirf_control;
  localparam int N_DV = 4096;
  logic clk = 0, rst_n = 1, start = 0, do_timing = 1;
  logic chal_req, chal_valid = 0, chal_load, meas_start, dv_done = 0;
  logic [11:0] chal_idx;
  logic diff_start, diff_done = 0, cal_start, cal_done = 0, sfb_start, bg_done = 0;
  logic busy, done;
  int checks = 0, failures = 0;
  int phase;          // 0 idle 1 timing 2 diff 3 cal 4 sfb
  int meas_cnt, next_idx;

  sirf_control #(.N_DV(N_DV)) dut (.clk, .rst_n, .start, .do_timing,
    .chal_req, .chal_idx, .chal_valid, .chal_load, .meas_start, .dv_done,
    .diff_start, .diff_done, .cal_start, .cal_done, .sfb_start, .bg_done, .busy, .done);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // engine stand-ins
  initial forever begin
    @(negedge clk);
    chal_valid = chal_req && ($urandom_range(0, 2) == 0);
  end
  initial forever begin
    @(posedge clk);
    if (chal_load) begin
      chk(chal_idx == 12'(next_idx), $sformatf("index %0d exp %0d", chal_idx, next_idx));
      next_idx++;
    end
    if (meas_start) begin
      chk(phase == 1, "measure in timing phase");
      meas_cnt++;
      fork begin
        repeat ($urandom_range(1, 6)) @(posedge clk);
        #1 dv_done = 1; @(posedge clk); #1 dv_done = 0;
      end join_none
    end
    if (diff_start) begin
      chk(phase == 1 || phase == 0, "difference after timing");
      phase = 2;
      fork begin repeat (20) @(posedge clk); #1 diff_done = 1; @(posedge clk); #1 diff_done = 0; end join_none
    end
    if (cal_start) begin
      chk(phase == 2, "calibration after difference");
      phase = 3;
      fork begin repeat (30) @(posedge clk); #1 cal_done = 1; @(posedge clk); #1 cal_done = 0; end join_none
    end
    if (sfb_start) begin
      chk(phase == 3, "bit generation after calibration");
      phase = 4;
      fork begin repeat (10) @(posedge clk); #1 bg_done = 1; @(posedge clk); #1 bg_done = 0; end join_none
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #12 rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      do_timing = (run == 0);
      phase = do_timing ? 1 : 0; meas_cnt = 0; next_idx = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) @(negedge clk);
      chk(phase == 4, "all phases ran");
      chk(meas_cnt == (do_timing ? N_DV : 0), $sformatf("measurements %0d", meas_cnt));
      @(negedge clk);
      chk(!busy, "idle at the end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
