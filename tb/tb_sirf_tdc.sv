// tb_sirf_tdc: random tap patterns (clean thermometer codes and codes with
// bubbles) and both polarities; the sample must be TAPS minus the number of
// taps that differ from the polarity, two cycles after capture.
module tb_sirf_tdc;
  localparam int TAPS = 2048;
  localparam int CW = $clog2(TAPS + 1);
  logic clk = 0, rst_n = 1, capture = 0, polarity = 0;
  logic [TAPS-1:0] taps;
  logic [CW-1:0] sample;
  logic sample_valid;
  int checks = 0, failures = 0;

  sirf_tdc #(.TAPS(TAPS)) dut (.clk, .rst_n, .capture, .polarity, .taps, .sample, .sample_valid);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    taps = '0;
    #1 rst_n = 0; #12 rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int reach, ones, bub;
      reach = $urandom_range(0, TAPS);
      polarity = 1'($urandom);
      for (int i = 0; i < TAPS; i++) taps[i] = (i < reach) ? ~polarity : polarity;
      ones = reach;
      bub = (it % 2) ? $urandom_range(0, 5) : 0;
      for (int b = 0; b < bub; b++) begin
        int p = $urandom_range(0, TAPS-1);
        ones += (taps[p] == polarity) ? 1 : -1;
        taps[p] = ~taps[p];
      end
      @(negedge clk) capture = 1;
      @(negedge clk) capture = 0; taps = '0;   // later changes must not matter
      checks++;
      if (sample_valid) begin failures++; $display("FAIL early valid"); end
      @(negedge clk);
      checks += 2;
      if (!sample_valid) begin failures++; $display("FAIL no valid"); end
      if (32'(sample) != TAPS - ones) begin failures++; $display("FAIL sample %0d exp %0d", sample, TAPS - ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
