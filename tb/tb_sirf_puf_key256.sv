// tb_sirf_puf_key256: the 256-bit key workload on the full design, at the
// default sizes (4096 delays, 2048 differences, 2048 carry-chain taps).
//
// For XMR 3, 5, 7, 9 and 11 at threshold 3 the testbench enrolls a 256-bit
// key by running iterations with new DVDiff seeds until the concatenated
// key streams hold 256 bits, and checks that the number of iterations equals
// the published one: 1, 2, 3, 3 and 4. The DVD_cr the server's SpreadFactors
// leave are spread uniformly in magnitude over [1.0, 10.0) with a random
// sign (about 25 of 2048 stay 0), the distribution the published yields
// assume. Paths are timed only in the very first iteration; every later
// iteration, also for the following XMR settings, runs with do_timing = 0
// on the stored delays (the published procedure times paths once per key;
// doing it once overall only saves simulation time).
// The XMR 11 key is then regenerated at a corner where every path is 3%
// slower and has new noise: the first regeneration iteration re-times the
// paths, the others reuse the stored delays, each gets back its own
// SpreadFactors and helper data, and the 256-bit key must come back
// unchanged. Every key and helper-data bit of every iteration is also
// compared with a reference model, as in the end-to-end testbench: the
// challenge source, carry-chain model and server model are the same.
// Watchdog: 300 ms of simulated time.
module tb_sirf_puf_key256;
  import sirf_pkg::*;
  localparam int TAPS = 2048;
  localparam int NS_LOG2 = 2;           // 4 samples per DV
  localparam int NS = 1 << NS_LOG2;
  localparam int THR = 3 * 16;
  int XMR = 3;                          // set per key
  localparam int RC = 128;

  logic clk = 0, rst_n = 1, start = 0, do_timing = 1;
  bg_mode_t mode = MODE_ENROLL;
  logic [10:0] seed_r, seed_f;
  logic [11:0] rc = 12'(RC);
  logic [15:0] threshold = 16'(THR);
  logic [3:0] xmr = 4'd3, samples_log2 = 4'(NS_LOG2);
  logic chal_req, chal_valid = 0;
  logic [11:0] chal_idx;
  net_chal_t chal;
  logic [4:0] chal_path;
  logic path_out;
  logic [TAPS-1:0] cc_taps;
  logic host_sf_we = 0, host_hd_we = 0, host_hd_wdata = 0;
  logic [10:0] host_sf_addr = 0, host_hd_addr = 0;
  logic [16:0] host_sf_wdata = 0;
  logic key_valid, key_bit, hd_valid, hd_bit, busy, done;

  sirf_puf_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------- challenge source ----------------
  function automatic logic [31:0] hash(int a, int b);
    logic [31:0] h;
    h = 32'(a) * 32'h9E3779B1 ^ 32'(b) * 32'h85EBCA77;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12;
    return h;
  endfunction

  function automatic net_chal_t chal_of(int idx);
    net_chal_t c;
    for (int w = 0; w < 24; w++) c[w*32 +: 32] = hash(idx, w);
    c[770:768] = 3'(hash(idx, 50));
    c.rows[2].tdc = (idx >= N_DVD);
    return c;
  endfunction

  always @(negedge clk) begin
    chal_valid = chal_req && ($urandom_range(0, 2) != 0);
    chal       = chal_of(int'(chal_idx));
    chal_path  = 5'(hash(int'(chal_idx), 60));
  end

  // ---------------- carry chain model ----------------
  int base [N_DV];        // delay of each path in carry-chain units
  int dly [N_DV][NS];     // delay applied to each sample of this run
  int scnt [N_DV];
  int cur_reach = 0;
  logic cur_pol = 0;
  int n_launch = 0, n_restore = 0, n_rise = 0, n_fall = 0;

  bit armed = 0;                          // set once reset has been applied
  always @(path_out) begin
    if (rst_n && armed) begin
      int i;
      i = int'(dut.chal_idx);
      cur_pol = dut.chal_q.rows[0].tdc;
      if (path_out != cur_pol) begin
        cur_reach = TAPS - dly[i][scnt[i] % NS];
        scnt[i]++;
        n_launch++;
        if (path_out) n_rise++; else n_fall++;
      end else begin
        n_restore++;
      end
    end
  end

  // at each capture the end-point output must be the path the challenge
  // selected, and the edge must have reached it
  always @(posedge clk) begin
    if (rst_n && dut.capture) begin
      automatic int i = int'(dut.chal_idx);
      chk(path_out == dut.u_netlist.edge_in[0][5'(hash(i, 60))] && path_out != cur_pol,
          $sformatf("captured edge on selected path, DV %0d", i));
    end
  end

  always_comb begin
    for (int k = 0; k < TAPS; k++)
      cc_taps[k] = (path_out != cur_pol && k < cur_reach) ? ~cur_pol : cur_pol;
  end

  // ---------------- reference model ----------------
  logic [15:0] e_dv [N_DV];
  logic [15:0] e_dvd [N_DVD];
  int          e_dvc [N_DVD];
  int          off [N_DVD];
  logic [16:0] sfw [N_DVD];
  bit          e_hd [N_DVD];
  bit          e_key [$];
  bit          got_key [$];
  bit          got_hd [$];
  int n_flip = 0, n_weak = 0, n_skip = 0, n_corr = 0;

  always @(posedge clk) begin
    if (key_valid) got_key.push_back(key_bit);
    if (hd_valid)  got_hd.push_back(hd_bit);
  end

  function automatic logic [10:0] lfsr_next(logic [10:0] s);
    return {s[9:0], s[10] ^ s[8] ^ (s[9:0] == 10'd0)};
  endfunction

  task automatic ref_dv();
    for (int i = 0; i < N_DV; i++) begin
      int sum = 0;
      for (int s = 0; s < NS; s++) sum += dly[i][s];
      e_dv[i] = 16'((sum * 16) >> NS_LOG2);
    end
  endtask

  task automatic ref_dvc(logic [10:0] sr, logic [10:0] sf);
    longint sum, mu, mn, mx, rng;
    logic [10:0] r, f;
    r = sr; f = sf;
    for (int k = 0; k < N_DVD; k++) begin
      int d;
      d = int'(e_dv[{1'b0, r}]) - int'(e_dv[{1'b1, f}]);
      e_dvd[k] = 16'(d);
      r = lfsr_next(r); f = lfsr_next(f);
    end
    sum = 0; mn = 1 << 20; mx = -(1 << 20);
    for (int k = 0; k < N_DVD; k++) begin
      longint v;
      v = longint'($signed(e_dvd[k]));
      sum += v; if (v < mn) mn = v; if (v > mx) mx = v;
    end
    mu = (sum >= 0) ? sum / 2048 : -((-sum + 2047) / 2048);
    rng = mx - mn;
    for (int k = 0; k < N_DVD; k++) begin
      longint d, q;
      d = longint'($signed(e_dvd[k])) - mu;
      q = ((d < 0 ? -d : d) * RC * 16) / rng;
      e_dvc[k] = int'((d < 0) ? -q : q);
    end
  endtask

  // server: SpreadFactors that leave DVD_cr = +-off
  task automatic make_sf();
    for (int k = 0; k < N_DVD; k++) begin
      bit fl;
      // magnitudes uniform over [1.0, 10.0), random sign, about 25 zeros
      if ($urandom_range(0, 2047) < 25) off[k] = 0;
      else off[k] = ($urandom_range(0, 1) == 1) ? int'($urandom_range(16, 159))
                                                 : -int'($urandom_range(16, 159));
      fl = 1'($urandom);
      n_flip += fl;
      sfw[k] = {fl, 16'(fl ? e_dvc[k] + off[k] : e_dvc[k] - off[k])};
    end
  endtask

  function automatic int cr_of(int k);
    int d;
    d = e_dvc[k] - int'($signed(sfw[k][15:0]));
    return sfw[k][16] ? -d : d;
  endfunction

  task automatic ref_enroll();
    int cnt = 0;
    bit val = 0;
    e_key.delete();
    for (int k = 0; k < N_DVD; k++) begin
      int c;
      bit st, b, sel;
      c = cr_of(k);
      st = (c > THR) || (c < -THR);
      b = c > 0;
      sel = st && (cnt == 0 || b == val);
      if (!st) n_weak++;
      else if (!sel) n_skip++;
      if (sel && cnt == 0) val = b;
      e_hd[k] = sel;
      if (sel) begin
        cnt++;
        if (cnt == XMR) begin e_key.push_back(val); cnt = 0; end
      end
    end
  endtask

  task automatic ref_regen();
    int cnt = 0, ones = 0;
    e_key.delete();
    for (int k = 0; k < N_DVD; k++) begin
      if (e_hd[k]) begin
        ones += (cr_of(k) > 0);
        cnt++;
        if (cnt == XMR) begin
          if (ones != 0 && ones != XMR) n_corr++;
          e_key.push_back(2 * ones > XMR);
          cnt = 0; ones = 0;
        end
      end
    end
  endtask

  task automatic set_delays(int scale_pct, int noise);
    for (int i = 0; i < N_DV; i++) begin
      scnt[i] = 0;
      for (int s = 0; s < NS; s++)
        dly[i][s] = (base[i] * scale_pct) / 100 + int'($urandom_range(0, 2 * noise)) - noise;
    end
  endtask

  task automatic load_sf();
    for (int k = 0; k < N_DVD; k++) begin
      @(negedge clk);
      host_sf_we = 1; host_sf_addr = 11'(k); host_sf_wdata = sfw[k];
    end
    @(negedge clk) host_sf_we = 0;
  endtask

  task automatic run_and_check(string tag, int max_cycles);
    int cyc = 0;
    got_key.delete(); got_hd.delete();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done && cyc < max_cycles) begin @(negedge clk); cyc++; end
    chk(done, {tag, ": finished"});
    repeat (2) @(negedge clk);
    chk(got_key.size() == e_key.size(), $sformatf("%s: key length %0d exp %0d", tag, got_key.size(), e_key.size()));
    for (int i = 0; i < e_key.size() && i < got_key.size(); i++)
      chk(got_key[i] == e_key[i], $sformatf("%s: key bit %0d", tag, i));
    $display("INFO %s: %0d cycles, %0d key bits", tag, cyc, got_key.size());
  endtask



  localparam int MAXIT = 6;
  logic [10:0] it_sr [MAXIT], it_sf [MAXIT];
  logic [16:0] it_sfw [MAXIT][N_DVD];
  bit          it_hd [MAXIT][N_DVD];

  initial begin
    #300ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [5] = '{3, 5, 7, 9, 11};
    int table_iters [5] = '{1, 2, 3, 3, 4};
    bit key11 [$];
    int n_it11, seedc;
    bit timed;
    for (int i = 0; i < N_DV; i++)
      base[i] = (i < N_DVD) ? 780 + int'($urandom_range(0, 120)) : 800 + int'($urandom_range(0, 160));
    #1 rst_n = 0; #22 rst_n = 1; armed = 1;
    set_delays(100, 2);
    ref_dv();
    timed = 0; seedc = 0; n_it11 = 0;

    // ---- enrollment of one 256-bit key per XMR setting ----
    foreach (xs[xi]) begin
      bit key [$];
      int n_it;
      XMR = xs[xi]; xmr = 4'(XMR);
      key.delete(); n_it = 0;
      while (key.size() < 256 && n_it < MAXIT) begin
        seed_r = 11'(hash(seedc, 1)); seed_f = 11'(hash(seedc, 2)); seedc++;
        ref_dvc(seed_r, seed_f); make_sf(); ref_enroll();
        load_sf();
        mode = MODE_ENROLL; do_timing = !timed;
        run_and_check($sformatf("XMR %0d enroll iteration %0d", XMR, n_it + 1), 2000000);
        chk(got_hd.size() == N_DVD, "helper data length");
        for (int k = 0; k < N_DVD && k < got_hd.size(); k++)
          chk(got_hd[k] == e_hd[k], $sformatf("hd %0d", k));
        timed = 1;
        it_sr[n_it] = seed_r; it_sf[n_it] = seed_f; it_sfw[n_it] = sfw;
        for (int k = 0; k < N_DVD; k++) it_hd[n_it][k] = got_hd[k];
        foreach (got_key[i]) key.push_back(got_key[i]);
        n_it++;
      end
      $display("INFO XMR %0d: 256-bit key after %0d iterations (%0d bits), published %0d",
               XMR, n_it, key.size(), table_iters[xi]);
      chk(n_it == table_iters[xi], $sformatf("XMR %0d iterations %0d, published %0d",
                                             XMR, n_it, table_iters[xi]));
      if (XMR == 11) begin key11 = key[0:255]; n_it11 = n_it; end
    end
    chk(n_launch == N_DV * NS, $sformatf("paths timed once: %0d launches", n_launch));

    // ---- regeneration of the XMR 11 key at a slower corner ----
    begin
      bit key [$];
      int n_eq;
      XMR = 11; xmr = 4'd11;
      set_delays(103, 10);
      ref_dv();
      key.delete();
      for (int it = 0; it < n_it11; it++) begin
        seed_r = it_sr[it]; seed_f = it_sf[it];
        ref_dvc(seed_r, seed_f);
        sfw = it_sfw[it];
        e_hd = it_hd[it];
        ref_regen();
        load_sf();
        for (int k = 0; k < N_DVD; k++) begin
          @(negedge clk) host_hd_we = 1; host_hd_addr = 11'(k); host_hd_wdata = it_hd[it][k];
        end
        @(negedge clk) host_hd_we = 0;
        mode = MODE_REGEN; do_timing = (it == 0);
        run_and_check($sformatf("XMR 11 regenerate iteration %0d", it + 1), 2000000);
        foreach (got_key[i]) key.push_back(got_key[i]);
      end
      n_eq = 0;
      for (int i = 0; i < 256 && i < key.size(); i++) n_eq += (key[i] == key11[i]);
      $display("INFO XMR 11 regenerated key: %0d of 256 bits equal, %0d majority corrections",
               n_eq, n_corr);
      chk(key.size() >= 256 && n_eq == 256, "regenerated 256-bit key equals the enrolled one");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
