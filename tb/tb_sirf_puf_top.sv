// tb_sirf_puf_top: end-to-end test of the SiRF PUF at its default sizes
// (4096 delays, 2048 differences, 2048 carry-chain taps).
//
// The testbench plays three roles around the design:
//  * challenge source: a configuration vector and path select for every
//    DV index, derived from the index by a hash; indices below 2048 launch
//    rising edges in the first row (DV_R), the others falling ones (DV_F);
//  * carry chain: when path_out makes its transition, the model picks the
//    path's delay in carry-chain units (a fixed per-path value, scaled for a
//    temperature/voltage corner, plus per-sample noise) and presents the
//    tap outputs the edge would have reached at capture time;
//  * server: from the delays it will apply, it computes the DV, DVD and
//    DVD_c the device should obtain and loads SpreadFactors that place each
//    DVD_cr at a random offset in +-9 (with random flips), like the
//    population median plus randomisation would.
// Runs: (1) enrollment with path timing, (2) regeneration with timing at a
// corner (delays 3% slower, new noise) using the helper data from (1),
// (3) enrollment without timing and new LFSR seeds. Every key bit and
// helper-data bit is compared with the reference model; run 2 must also
// reproduce run 1's key (at most 2% of bits may differ; none did in
// practice). Each mechanism (launches, restores, rising and falling
// classes, SF flips, weak bits, XMR skips, majority corrections, skipped
// timing) is counted and must occur.
module tb_sirf_puf_top;
  import sirf_pkg::*;
  localparam int TAPS = 2048;
  localparam int NS_LOG2 = 2;           // 4 samples per DV
  localparam int NS = 1 << NS_LOG2;
  localparam int THR = 3 * 16;
  localparam int XMR = 3;
  localparam int RC = 128;

  logic clk = 0, rst_n = 1, start = 0, do_timing = 1;
  bg_mode_t mode = MODE_ENROLL;
  logic [10:0] seed_r, seed_f;
  logic [11:0] rc = 12'(RC);
  logic [15:0] threshold = 16'(THR);
  logic [3:0] xmr = 4'(XMR), samples_log2 = 4'(NS_LOG2);
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
      off[k] = int'($urandom_range(0, 288)) - 144;
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

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit key1 [$];
    bit hd1 [N_DVD];
    int n_eq;
    for (int i = 0; i < N_DV; i++)
      base[i] = (i < N_DVD) ? 780 + int'($urandom_range(0, 120)) : 800 + int'($urandom_range(0, 160));
    #1 rst_n = 0; #22 rst_n = 1; armed = 1;

    // ---- run 1: enrollment with path timing ----
    seed_r = 11'd1234; seed_f = 11'd77;
    set_delays(100, 2);
    ref_dv(); ref_dvc(seed_r, seed_f); make_sf(); ref_enroll();
    load_sf();
    mode = MODE_ENROLL; do_timing = 1;
    run_and_check("enroll", 2000000);
    chk(got_hd.size() == N_DVD, "helper data length");
    for (int k = 0; k < N_DVD && k < got_hd.size(); k++) chk(got_hd[k] == e_hd[k], $sformatf("hd %0d", k));
    chk(n_launch == N_DV * NS, $sformatf("launches %0d", n_launch));
    for (int i = 0; i < N_DV; i++) chk(dut.u_dv_ram.mem[i] == e_dv[i], $sformatf("DV %0d", i));
    key1 = got_key;
    foreach (hd1[k]) hd1[k] = got_hd[k];

    // ---- run 2: regeneration at a slower corner ----
    for (int k = 0; k < N_DVD; k++) begin
      @(negedge clk) host_hd_we = 1; host_hd_addr = 11'(k); host_hd_wdata = hd1[k];
    end
    @(negedge clk) host_hd_we = 0;
    set_delays(103, 10);
    ref_dv();
    begin
      logic [16:0] keep [N_DVD];
      keep = sfw;
      ref_dvc(seed_r, seed_f);
      sfw = keep;                 // the server's SpreadFactors do not change
    end
    ref_regen();
    mode = MODE_REGEN; do_timing = 1;
    run_and_check("regenerate", 2000000);
    n_eq = 0;
    for (int i = 0; i < key1.size() && i < got_key.size(); i++) n_eq += (key1[i] == got_key[i]);
    // the bit-exact check against the reference is in run_and_check; against
    // the enrolled key, XMR voting must leave at most 2% of bits in error
    chk(got_key.size() == key1.size() && 50 * (key1.size() - n_eq) <= key1.size(),
        $sformatf("regenerated key matches enrolled key (%0d of %0d)", n_eq, key1.size()));
    $display("INFO regenerated key: %0d of %0d bits equal to enrollment", n_eq, key1.size());

    // ---- run 3: new seeds, no path timing ----
    seed_r = 11'd2000; seed_f = 11'd5;
    begin
      int l0;
      l0 = n_launch;
      ref_dvc(seed_r, seed_f); make_sf(); ref_enroll();
      load_sf();
      mode = MODE_ENROLL; do_timing = 0;
      run_and_check("new seeds, no timing", 500000);
      chk(n_launch == l0, $sformatf("no launches without timing (%0d -> %0d)", l0, n_launch));
    end

    // ---- mechanisms ----
    chk(n_launch > 0,  "launches");
    chk(n_restore > 0, "restores");
    chk(n_rise > 0 && n_fall > 0, "rising and falling end-point edges");
    chk(n_flip > 0, "SpreadFactor flips");
    chk(n_weak > 0, "weak bits discarded");
    chk(n_skip > 0, "XMR skips");
    chk(n_corr > 0, "majority corrections during regeneration");
    $display("INFO launches=%0d restores=%0d rise=%0d fall=%0d flips=%0d weak=%0d skips=%0d corrections=%0d",
             n_launch, n_restore, n_rise, n_fall, n_flip, n_weak, n_skip, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
