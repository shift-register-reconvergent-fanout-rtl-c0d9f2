// tb_sirf_divider: random and corner operands against the / operator, and
// the NW + 1 cycle latency.
module tb_sirf_divider;
  localparam int NW = 34, DW = 17;
  logic clk = 0, rst_n = 1, start = 0;
  logic [NW-1:0] num, quo;
  logic [DW-1:0] den;
  logic busy, done;
  int checks = 0, failures = 0;

  sirf_divider #(.NW(NW), .DW(DW)) dut (.clk, .rst_n, .start, .num, .den, .quo, .busy, .done);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #12 rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int cyc;
      logic [NW-1:0] n0;
      logic [DW-1:0] d0;
      n0 = {$urandom, $urandom} >> $urandom_range(0, 30);
      d0 = DW'($urandom) >> $urandom_range(0, 16);
      if (it == 0) begin n0 = '1; d0 = 1; end
      if (it == 1) begin n0 = '1; d0 = '1; end
      if (it == 2) begin n0 = 0; d0 = 5; end
      if (d0 == 0) d0 = 1;
      num = n0; den = d0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0; num = 0; den = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      checks += 2;
      if (quo !== n0 / NW'(d0)) begin failures++; $display("FAIL %0d / %0d = %0d", n0, d0, quo); end
      if (cyc != NW + 1) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
