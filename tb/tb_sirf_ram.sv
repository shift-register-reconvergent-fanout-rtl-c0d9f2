// tb_sirf_ram: random writes and reads against a reference array; read data
// one cycle after the address, old data on a same-address read and write.
module tb_sirf_ram;
  localparam int DEPTH = 4096, WIDTH = 16;
  logic clk = 0, we = 0;
  logic [11:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [DEPTH];
  logic [DEPTH-1:0] valid = '0;
  int checks = 0, failures = 0;

  sirf_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk) we = 1; waddr = 12'(a); wdata = 16'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int it = 0; it < 20000; it++) begin
      logic [15:0] exp;
      raddr = 12'($urandom);
      we = 1'($urandom);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 12'($urandom);
      wdata = 16'($urandom);
      exp = ref_mem[raddr];
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL addr %0d got %h exp %h", raddr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
