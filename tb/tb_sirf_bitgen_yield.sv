// tb_sirf_bitgen_yield: bitstring-yield workload for sirf_bitgen, thresholds
// 3 and 4 with XMR 3, 5, 7, 9 and 11, checked against the published yields.
//
// Input model (the one the yields were predicted from): after the
// SpreadFactor randomisation each DVD_cr is spread uniformly in magnitude,
// with a random sign, except for about 25 of the 2048 values per iteration
// that stay at 0.0. The magnitudes are drawn from the fixed-point values in
// [1.0, 10.0). With the strict threshold rule, threshold t then discards
// (t - 1)/9 of the non-zero values, which is the fraction the published
// yields are based on (2/9 at threshold 3, 3/9 at threshold 4).
//
// For each of the ten settings the testbench streams ITER iterations of
// 2048 values through the unit in enrollment mode, then reports the average
// number of strong bits and super-strong (key) bits per iteration. These
// must lie within 4% of the expected numbers:
//   strong bits at threshold 3: 1569 (published);
//   key bits at threshold 3: 314 (XMR 3), 174 (XMR 5), 74 (XMR 11) (published);
//   other settings: strong / (2*XMR - 1), the published rule for how many
//   strong bits one super-strong bit needs.
// It also checks that every helper-data bit marks a strong index and that
// the number of marked bits is XMR per key bit, plus at most XMR-1 per
// iteration for a final partial group.
// The helper-data RAM is modelled in the testbench. Watchdog: 20 ms.
module tb_sirf_bitgen_yield;
  import sirf_pkg::*;
  localparam int ITER = 12;

  logic clk = 0, rst_n = 1, start = 0;
  bg_mode_t mode = MODE_ENROLL;
  logic [15:0] threshold;
  logic [3:0] xmr;
  logic in_valid = 0, in_last = 0;
  logic [10:0] in_idx = 0;
  logic signed [15:0] in_cr = 0;
  logic [10:0] hd_raddr, hd_waddr;
  logic hd_rdata = 0, hd_we, hd_wdata;
  logic key_valid, key_bit, hdo_valid, hdo_bit, done;
  int checks = 0, failures = 0;
  int nkey = 0, nhd = 0, nhd_bad = 0;
  bit strong_at [2048];

  sirf_bitgen dut (.clk, .rst_n, .start, .mode, .threshold, .xmr,
    .in_valid, .in_idx, .in_cr, .in_last, .hd_raddr, .hd_rdata,
    .hd_we, .hd_waddr, .hd_wdata, .key_valid, .key_bit, .hdo_valid, .hdo_bit, .done);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (key_valid) nkey++;
    if (hd_we && hd_wdata) begin
      nhd++;
      if (!strong_at[hd_waddr]) nhd_bad++;
    end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit near(real got, real exp, real tol);
    return (got >= exp * (1.0 - tol)) && (got <= exp * (1.0 + tol));
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int thrs [2] = '{3, 4};
    int xs [5] = '{3, 5, 7, 9, 11};
    int published [5] = '{314, 174, 0, 0, 74};  // threshold 3; 0 = not published
    #1 rst_n = 0; #12 rst_n = 1;
    foreach (thrs[ti]) begin
      foreach (xs[xi]) begin
        int thr, x, nstrong;
        real s_avg, k_avg, k_exp;
        thr = thrs[ti] * 16; x = xs[xi];
        threshold = 16'(thr); xmr = 4'(x);
        nstrong = 0; nkey = 0; nhd = 0; nhd_bad = 0;
        for (int it = 0; it < ITER; it++) begin
          int cr [2048];
          for (int i = 0; i < 2048; i++) begin
            if ($urandom_range(0, 2047) < 25) cr[i] = 0;
            else begin
              cr[i] = int'($urandom_range(16, 159));
              if ($urandom_range(0, 1) == 1) cr[i] = -cr[i];
            end
            strong_at[i] = (cr[i] > thr) || (cr[i] < -thr);
            nstrong += int'(strong_at[i]);
          end
          @(negedge clk) start = 1;
          @(negedge clk) start = 0;
          for (int i = 0; i < 2048; i++) begin
            in_valid = 1; in_idx = 11'(i); in_cr = 16'(cr[i]); in_last = (i == 2047);
            @(negedge clk);
          end
          in_valid = 0; in_last = 0;
          repeat (4) @(negedge clk);
        end
        s_avg = real'(nstrong) / ITER;
        k_avg = real'(nkey) / ITER;
        if (thrs[ti] == 3 && published[xi] != 0) k_exp = published[xi];
        else k_exp = s_avg / (2 * x - 1);
        $display("INFO threshold %0d XMR %2d: %6.1f strong, %5.1f key bits per iteration (expected %5.1f)",
                 thrs[ti], x, s_avg, k_avg, k_exp);
        if (thrs[ti] == 3)
          chk(near(s_avg, 1569.0, 0.04), $sformatf("strong bits %0.1f vs 1569", s_avg));
        else
          chk(near(s_avg, 2023.0 * 6.0 / 9.0, 0.04), $sformatf("strong bits %0.1f vs 6/9 of 2023", s_avg));
        chk(near(k_avg, k_exp, 0.04), $sformatf("thr %0d XMR %0d key bits %0.1f vs %0.1f",
                                                 thrs[ti], x, k_avg, k_exp));
        // marked bits: XMR per key bit, plus at most XMR-1 of a final
        // partial group per iteration (marked, but giving no key bit)
        chk(nhd >= x * nkey && nhd <= x * nkey + ITER * (x - 1),
            $sformatf("helper-data bits %0d vs XMR x key bits %0d", nhd, x * nkey));
        chk(nhd_bad == 0, "helper data marks only strong bits");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
