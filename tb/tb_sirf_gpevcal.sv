// tb_sirf_gpevcal: random DVD sets (narrow and wide, shifted, plus a flat
// set with zero range) and several range constants; every DVD_c word is
// compared with trunc((DVD - floor(mean)) * rc * 16 / range) computed in
// the testbench, saturated to 16 bits.
module tb_sirf_gpevcal;
  logic clk = 0, rst_n = 1, start = 0;
  logic [11:0] rc;
  logic [10:0] dvd_raddr, dvc_waddr;
  logic [15:0] dvd_rdata, dvc_wdata;
  logic dvc_we, busy, done;
  logic [15:0] dvd [2048];
  logic [15:0] got [2048];
  int checks = 0, failures = 0;

  sirf_gpevcal dut (.clk, .rst_n, .start, .rc, .dvd_raddr, .dvd_rdata,
                    .dvc_we, .dvc_waddr, .dvc_wdata, .busy, .done);
  always #5 clk = ~clk;
  always_ff @(posedge clk) dvd_rdata <= dvd[dvd_raddr];
  always_ff @(posedge clk) if (dvc_we) got[dvc_waddr] <= dvc_wdata;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #12 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      longint sum, mu, mn, mx, range;
      int width, off, cyc;
      width = (t == 1) ? 60000 : (t == 4) ? 0 : 6400;
      off   = (t == 2) ? 9000 : (t == 3) ? -12000 : -1000;
      rc    = (t == 3) ? 12'd4095 : (t == 2) ? 12'd37 : 12'd128;
      for (int i = 0; i < 2048; i++)
        dvd[i] = 16'(off + ((width == 0) ? 0 : $urandom_range(0, width) - width / 2));
      sum = 0; mn = 40000; mx = -40000;
      for (int i = 0; i < 2048; i++) begin
        longint v;
        v = longint'($signed(dvd[i]));
        sum += v;
        if (v < mn) mn = v;
        if (v > mx) mx = v;
      end
      mu = (sum >= 0) ? sum / 2048 : -((-sum + 2047) / 2048);
      range = mx - mn;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 200000) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (!(cyc > 2048 && cyc < 200000)) begin failures++; $display("FAIL no done"); end
      for (int i = 0; i < 2048; i++) begin
        longint d, q, e;
        d = longint'($signed(dvd[i])) - mu;
        if (range == 0) q = 0;
        else begin
          q = ((d < 0 ? -d : d) * rc * 16) / range;
          if (q > 32767) q = 32767;
          if (d < 0) q = -q;
        end
        e = q;
        checks++;
        if ($signed(got[i]) != 16'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d i=%0d got %0d exp %0d", t, i, $signed(got[i]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
