// tb_sirf_srl: checks the shift-register LUT. After init every address a
// reads a[0]; each rising shift clock toggles every address (bit i takes
// bit i-1); a rising path_in while disabled does nothing, and releasing
// disable while path_in is high is one shift; 32 shifts return the pattern.
module tb_sirf_srl;
  logic path_in = 0, dis = 0, init = 0;
  logic [3:0] src;
  logic tdc;
  logic path_out;
  int checks = 0, failures = 0;
  int nshift = 0;

  sirf_srl dut (.path_in, .disable_i(dis), .init, .src, .tdc, .path_out);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic check_all();
    for (int a = 0; a < 32; a++) begin
      {src, tdc} = 5'(a);
      #1;
      chk(path_out == (a[0] ^ nshift[0]), $sformatf("addr %0d after %0d shifts", a, nshift));
    end
  endtask

  task automatic pulse();
    #1 path_in = 1; #1 path_in = 0; #1;
  endtask

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src = 0; tdc = 0;
    #1 init = 1; #1 init = 0; #1;
    check_all();
    pulse(); nshift++;
    check_all();
    // disabled: no shift
    dis = 1; pulse(); dis = 0; #1;
    check_all();
    // edge made by releasing disable with path_in high
    dis = 1; #1 path_in = 1; #1 dis = 0; #1; nshift++;
    check_all();
    path_in = 0; #1;
    check_all();
    // a circular register returns after 32 shifts: check a specific bit
    // moves one place per shift
    for (int n = 0; n < 31; n++) begin pulse(); nshift++; end
    check_all();
    // init restores the pattern
    init = 1; #1 init = 0; nshift = 0; #1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
