// tb_sirf_dvdiff: fills a DV memory with random delays (including extremes
// that saturate), runs the Difference module for several seed pairs and
// checks every DVD word against pairs computed with an independently
// written LFSR model, that each DV_R and DV_F index is used exactly once,
// and the 3 cycles per difference.
module tb_sirf_dvdiff;
  logic clk = 0, rst_n = 1, start = 0;
  logic [10:0] seed_r, seed_f;
  logic [11:0] dv_raddr;
  logic [15:0] dv_rdata;
  logic dvd_we, busy, done;
  logic [10:0] dvd_waddr;
  logic [15:0] dvd_wdata;
  logic [15:0] dv [4096];
  logic [15:0] got [2048];
  int checks = 0, failures = 0;

  sirf_dvdiff dut (.clk, .rst_n, .start, .seed_r, .seed_f, .dv_raddr, .dv_rdata,
                   .dvd_we, .dvd_waddr, .dvd_wdata, .busy, .done);
  always #5 clk = ~clk;
  always_ff @(posedge clk) dv_rdata <= dv[dv_raddr];
  always_ff @(posedge clk) if (dvd_we) got[dvd_waddr] <= dvd_wdata;

  function automatic logic [10:0] nxt(logic [10:0] s);
    logic f;
    f = s[10] ^ s[8];
    if (s[9:0] == 0) f = ~f;
    return {s[9:0], f};
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #12 rst_n = 1;
    for (int i = 0; i < 4096; i++) dv[i] = 16'(12800 + $urandom_range(0, 3200) - 1600);
    dv[5] = 16'hFFFF; dv[2048 + 9] = 16'h0000; dv[2048 + 5] = 16'hFFFF; dv[9] = 0;
    for (int t = 0; t < 4; t++) begin
      int cyc, useR [2048], useF [2048];
      logic [10:0] r, f;
      for (int i = 0; i < 2048; i++) begin useR[i] = 0; useF[i] = 0; end
      seed_r = 11'($urandom); seed_f = 11'($urandom);
      if (t == 0) begin seed_r = 0; seed_f = 11'h400; end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 20000) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (cyc != 3 * 2048 + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
      r = seed_r; f = seed_f;
      for (int k = 0; k < 2048; k++) begin
        int d;
        logic [15:0] e;
        d = int'(dv[{1'b0, r}]) - int'(dv[{1'b1, f}]);
        e = (d > 32767) ? 16'h7FFF : (d < -32768) ? 16'h8000 : 16'(d);
        checks++;
        if (got[k] !== e) begin failures++; $display("FAIL k=%0d got %h exp %h", k, got[k], e); end
        useR[r]++; useF[f]++;
        r = nxt(r); f = nxt(f);
      end
      for (int i = 0; i < 2048; i++) begin
        checks++;
        if (useR[i] != 1 || useF[i] != 1) begin failures++; $display("FAIL pairing index %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
