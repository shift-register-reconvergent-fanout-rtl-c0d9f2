// tb_sirf_storage: random samples for each sample count 1..128; the word
// written must be floor(sum * 16 / 2^n) at the latched index, written once,
// one cycle after the last sample.
module tb_sirf_storage;
  logic clk = 0, rst_n = 1, start = 0, sample_valid = 0;
  logic [11:0] idx, sample;
  logic [3:0] samples_log2;
  logic we, done;
  logic [11:0] waddr;
  logic [15:0] wdata;
  int checks = 0, failures = 0;

  sirf_storage dut (.clk, .rst_n, .start, .idx, .samples_log2, .sample_valid, .sample,
                    .we, .waddr, .wdata, .done);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #12 rst_n = 1;
    for (int it = 0; it < 80; it++) begin
      int n, sum, nw;
      logic [11:0] exp_idx;
      n = it % 8;
      samples_log2 = 4'(n);
      idx = 12'($urandom);
      exp_idx = idx;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0; idx = 0;
      sum = 0; nw = 0;
      for (int s = 0; s < (1 << n); s++) begin
        sample = 12'($urandom_range(0, 2048));
        sum += sample;
        sample_valid = 1;
        @(negedge clk);
        sample_valid = 0;
        if (s < (1 << n) - 1) begin
          if (we) nw++;
          if ($urandom_range(0, 1)) begin @(negedge clk); if (we) nw++; end
        end
      end
      checks++;
      if (nw != 0) begin failures++; $display("FAIL early write"); end
      checks += 3;
      if (!we || !done) begin failures++; $display("FAIL no write"); end
      if (waddr != exp_idx) begin failures++; $display("FAIL addr"); end
      if (wdata != 16'((sum * 16) >> n)) begin failures++; $display("FAIL dv %0d exp %0d", wdata, (sum*16)>>n); end
      @(negedge clk);
      if (we) begin failures++; $display("FAIL double write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
