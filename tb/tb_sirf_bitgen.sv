// tb_sirf_bitgen: random DVD_cr streams (with gaps) for several thresholds
// and XMR levels. Enrollment: helper data and key bits are compared with a
// reference model of the thresholding and grouping rules. Regeneration: the
// same values with added noise (some bits flipped across 0) are replayed
// with the stored helper data; the key bits must equal the reference
// majority vote, and with noise below the threshold they must equal the
// enrolled key.
module tb_sirf_bitgen;
  import sirf_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  bg_mode_t mode;
  logic [15:0] threshold;
  logic [3:0] xmr;
  logic in_valid = 0, in_last = 0;
  logic [10:0] in_idx = 0;
  logic signed [15:0] in_cr = 0;
  logic [10:0] hd_raddr, hd_waddr;
  logic hd_rdata, hd_we, hd_wdata;
  logic key_valid, key_bit, hdo_valid, hdo_bit, done;
  logic hd_mem [2048];
  int checks = 0, failures = 0;
  bit keys [$];
  bit hdos [$];
  int ndone = 0;

  sirf_bitgen dut (.clk, .rst_n, .start, .mode, .threshold, .xmr,
    .in_valid, .in_idx, .in_cr, .in_last, .hd_raddr, .hd_rdata,
    .hd_we, .hd_waddr, .hd_wdata, .key_valid, .key_bit, .hdo_valid, .hdo_bit, .done);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    hd_rdata <= hd_mem[hd_raddr];
    if (hd_we) hd_mem[hd_waddr] <= hd_wdata;
  end
  always @(posedge clk) begin
    if (key_valid) keys.push_back(key_bit);
    if (hdo_valid) hdos.push_back(hdo_bit);
    if (done) ndone++;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic run(int cr [2048]);
    keys.delete(); hdos.delete(); ndone = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < 2048; i++) begin
      in_valid = 1; in_idx = 11'(i); in_cr = 16'(cr[i]); in_last = (i == 2047);
      @(negedge clk);
      in_valid = 0; in_last = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [5] = '{1, 3, 5, 7, 11};
    #1 rst_n = 0; #12 rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      int cr [2048], cr2 [2048];
      int thr, x, cnt, ones, nstrong;
      bit val;
      bit ekey [$];
      bit ehd [2048];
      bit rkey [$];
      ekey.delete(); rkey.delete();
      x = xs[t % 5];
      thr = (t < 5) ? 3 * 16 : 4 * 16;
      threshold = 16'(thr); xmr = 4'(x);
      for (int i = 0; i < 2048; i++) cr[i] = $urandom_range(0, 288) - 144;  // +-9.0
      cr[7] = thr; cr[8] = -thr; cr[9] = 0;
      // ---- enrollment reference ----
      cnt = 0; nstrong = 0;
      for (int i = 0; i < 2048; i++) begin
        bit st, b, sel;
        st = (cr[i] > thr) || (cr[i] < -thr);
        b = cr[i] > 0;
        sel = 0;
        if (st) begin
          nstrong++;
          if (cnt == 0) begin val = b; sel = 1; end
          else if (b == val) sel = 1;
        end
        ehd[i] = sel;
        if (sel) begin
          cnt++;
          if (cnt == x) begin ekey.push_back(val); cnt = 0; end
        end
      end
      mode = MODE_ENROLL;
      run(cr);
      chk(ndone == 1, "enroll done once");
      chk(hdos.size() == 2048, "helper data count");
      for (int i = 0; i < 2048 && i < hdos.size(); i++) chk(hdos[i] == ehd[i], $sformatf("hd %0d", i));
      for (int i = 0; i < 2048; i++) chk(hd_mem[i] == ehd[i], $sformatf("hd mem %0d", i));
      chk(keys.size() == ekey.size(), $sformatf("key length %0d exp %0d", keys.size(), ekey.size()));
      for (int i = 0; i < ekey.size() && i < keys.size(); i++) chk(keys[i] == ekey[i], $sformatf("key %0d", i));
      // ---- regeneration with noise ----
      for (int i = 0; i < 2048; i++) cr2[i] = cr[i] + ((t % 2) ? $urandom_range(0, 2*thr) - thr
                                                                 : $urandom_range(0, thr) - thr / 2);
      cnt = 0; ones = 0;
      for (int i = 0; i < 2048; i++) begin
        if (ehd[i]) begin
          ones += (cr2[i] > 0);
          cnt++;
          if (cnt == x) begin rkey.push_back(2 * ones > x); cnt = 0; ones = 0; end
        end
      end
      mode = MODE_REGEN;
      run(cr2);
      chk(ndone == 1, "regen done once");
      chk(keys.size() == rkey.size(), "regen key length");
      for (int i = 0; i < rkey.size() && i < keys.size(); i++) chk(keys[i] == rkey[i], $sformatf("regen key %0d", i));
      if (t % 2 == 0)
        for (int i = 0; i < ekey.size() && i < keys.size(); i++) chk(keys[i] == ekey[i], "regen equals enrolled");
      $display("INFO thr=%0d xmr=%0d strong=%0d key bits=%0d", thr / 16, x, nstrong, ekey.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
