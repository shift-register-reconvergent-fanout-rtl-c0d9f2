// tb_sirf_spreadfactors: random DVD_c and SpreadFactor words (with flips and
// saturating extremes); the stream must deliver every index once, in
// order, one per cycle, with DVD_cr = +-(DVD_c - SF), last and done on 2047.
module tb_sirf_spreadfactors;
  logic clk = 0, rst_n = 1, start = 0;
  logic [10:0] raddr, out_idx;
  logic [15:0] dvc_rdata;
  logic [16:0] sf_rdata;
  logic out_valid, out_last, busy, done;
  logic signed [15:0] out_cr;
  logic [15:0] dvc [2048];
  logic [16:0] sf [2048];
  int checks = 0, failures = 0;

  sirf_spreadfactors dut (.clk, .rst_n, .start, .raddr, .dvc_rdata, .sf_rdata,
                          .out_valid, .out_idx, .out_cr, .out_last, .busy, .done);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    dvc_rdata <= dvc[raddr];
    sf_rdata  <= sf[raddr];
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #12 rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int n, first, last_at, cyc;
      for (int i = 0; i < 2048; i++) begin
        dvc[i] = 16'($urandom_range(0, 2000) - 1000);
        sf[i]  = {1'($urandom), 16'($urandom_range(0, 1600) - 800)};
      end
      dvc[3] = 16'h7FFF; sf[3] = {1'b0, 16'h8000};
      dvc[4] = 16'h8000; sf[4] = {1'b0, 16'h7FFF};
      dvc[6] = 16'h8000; sf[6] = {1'b1, 16'h0000};
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      n = 0; cyc = 1; first = -1; last_at = -1;
      while (cyc < 3000) begin
        if (out_valid) begin
          int d, e;
          if (first < 0) first = cyc;
          d = int'($signed(dvc[n])) - int'($signed(sf[n][15:0]));
          if (sf[n][16]) d = -d;
          e = (d > 32767) ? 32767 : (d < -32768) ? -32768 : d;
          checks += 2;
          if (out_idx != 11'(n)) begin failures++; $display("FAIL order %0d %0d", out_idx, n); end
          if (int'(out_cr) != e) begin failures++; $display("FAIL i=%0d got %0d exp %0d", n, out_cr, e); end
          if (out_last) last_at = n;
          n++;
        end
        @(negedge clk); cyc++;
      end
      checks += 3;
      if (n != 2048) begin failures++; $display("FAIL count %0d", n); end
      if (last_at != 2047) begin failures++; $display("FAIL last"); end
      if (first != 3) begin failures++; $display("FAIL latency %0d", first); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
