// tb_sirf_netlist: one launch / measure / restore cycle per random
// configuration vector, 200 times. Checks: before launch every path end
// point sits at row 0's direction bit and changing the challenge makes no
// edge; after launch every end point (all 32 path selects) has made exactly
// one transition in the direction row 0's bit selects; after the disable
// pulse and launch clear the netlist is back at its idle levels, so the
// next launch measures the same direction again.
module tb_sirf_netlist;
  import sirf_pkg::*;
  logic clk = 0, init = 0, launch_set = 0, launch_clr = 0, sr_disable = 0;
  net_chal_t chal;
  logic [4:0] path_sel = 0;
  logic path_out;
  int checks = 0, failures = 0;
  int edges = 0;

  sirf_netlist dut (.clk, .init, .launch_set, .launch_clr, .sr_disable, .chal, .path_sel, .path_out);

  always #5 clk = ~clk;
  always @(path_out) if (!init) edges++;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic all_paths(logic exp, string tag);
    for (int p = 0; p < 32; p++) begin
      path_sel = 5'(p);
      #0.1;
      chk(path_out === exp, $sformatf("%s path %0d", tag, p));
    end
  endtask

  task automatic rand_chal();
    for (int w = 0; w < 25; w++) chal[w*32 +: 32] = $urandom;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0;
    for (int w = 0; w < 25; w++) chal[w*32 +: 32] = '0;
    #1 init = 1; #1 init = 0;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      rand_chal();
      #1;
      all_paths(chal.rows[0].tdc, "idle");
      path_sel = 5'($urandom);
      #1;
      e0 = edges;
      // launch (re-aligned to the clock after the probing delays)
      @(negedge clk);
      launch_set = 1; @(negedge clk); launch_set = 0;
      chk(edges == e0 + 1, $sformatf("one edge on path_out (got %0d)", edges - e0));
      for (int r = 0; r < NROWS; r++)
        chk(dut.edge_in[r] === {NPATHS{~chal.rows[r].tdc}}, $sformatf("row %0d transitioned", r));
      all_paths(~chal.rows[0].tdc, "launched");
      // restore
      sr_disable = 1; @(negedge clk); sr_disable = 0;
      launch_clr = 1; @(negedge clk); launch_clr = 0;
      all_paths(chal.rows[0].tdc, "restored");
      chk(dut.launch_q === '0, "launch FFs clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
