// tb_sirf_lfsr11: from several seeds the sequence must visit all 2048
// values once before repeating, and each step must follow the recurrence
// s(t+1) = {s[9:0], s[10] ^ s[8] ^ (s[9:0] == 0)}.
module tb_sirf_lfsr11;
  logic clk = 0, rst_n = 1, load = 0, step = 0;
  logic [10:0] seed, q;
  int checks = 0, failures = 0;

  sirf_lfsr11 dut (.clk, .rst_n, .load, .seed, .step, .q);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [2048];
    #1 rst_n = 0; #12 rst_n = 1;
    for (int sd = 0; sd < 6; sd++) begin
      int distinct;
      logic [10:0] prev, e;
      seed = (sd == 0) ? 11'd0 : (sd == 1) ? 11'h400 : 11'($urandom);
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      checks++;
      if (q !== seed) begin failures++; $display("FAIL load"); end
      foreach (seen[i]) seen[i] = 0;
      distinct = 0;
      step = 1;
      for (int t = 0; t < 2048; t++) begin
        if (!seen[q]) distinct++;
        seen[q] = 1;
        prev = q;
        @(negedge clk);
        e = {prev[9:0], prev[10] ^ prev[8] ^ (prev[9:0] == 10'd0)};
        checks++;
        if (q !== e) begin failures++; $display("FAIL step %h -> %h", prev, q); end
      end
      step = 0;
      checks += 2;
      if (distinct != 2048) begin failures++; $display("FAIL period: %0d distinct", distinct); end
      if (q !== seed) begin failures++; $display("FAIL not back at seed"); end
      // hold when step is low
      @(negedge clk);
      checks++;
      if (q !== seed) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
