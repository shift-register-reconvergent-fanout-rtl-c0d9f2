// tb_sirf_module: drives one SiRF module with random challenges, random
// neighbour inputs and a random subset of shift clocks, and compares every
// output with a reference model written from the wiring rules (LUT value =
// direction bit toggled by each shift, gate rows, MUX inputs).
module tb_sirf_module;
  import sirf_pkg::*;
  localparam int COL = 5;
  logic init = 0, sr_disable = 0, xn = 1;
  logic [3:0] clk_in = '0;
  mod_chal_t chal;
  logic tdc;
  logic [2:0] ri_a, ri_b, ro_a, ro_b;
  logic [3:0] out;
  int nsh [4];
  int checks = 0, failures = 0;

  sirf_module #(.COL(COL)) dut (.init, .sr_disable, .clk_in, .xn, .chal, .tdc,
                                .ri_a, .ri_b, .ro_a, .ro_b, .out);
  function automatic logic gate(gate_t t, logic [3:0] v, int k);
    logic a, b, c;
    a = v[k]; b = v[(k+1)%4]; c = v[(k+2)%4];
    case (t)
      G_AND:   return a & b;
      G_OR:    return a | b;
      default: return (a & b) | c;
    endcase
  endfunction

  // SRL output: initial bit a[0], toggled by every shift.
  function automatic logic lut(logic tdc, int nshift);
    return tdc ^ nshift[0];
  endfunction

  // One module given its LUT outputs and neighbour inputs.
  function automatic void module_eval(int col, mod_chal_t ch, logic [3:0] s,
                                      logic [2:0] ri_a, logic [2:0] ri_b,
                                      output logic [3:0] ga, output logic [3:0] out,
                                      output logic [3:0] gb_o);
    logic [3:0] ma, gb;
    gate_t ta [4];
    gate_t tb [4];
    ta = '{G_AND, G_OR, G_AND, G_AO};
    for (int k = 0; k < 4; k++) begin
      if (k == 3)          tb[k] = G_AO;
      else if (col%3 == 0) tb[k] = G_AO;
      else if (col%3 == 1) tb[k] = G_AND;
      else                 tb[k] = G_OR;
    end
    for (int k = 0; k < 4; k++) ga[k] = gate(ta[k], s, k);
    for (int j = 0; j < 4; j++) begin
      case (ch.mca[j])
        0: ma[j] = s[j];
        1: ma[j] = ga[j];
        2: ma[j] = ri_a[j%3];
        default: ma[j] = ga[(j+1)%4];
      endcase
    end
    for (int k = 0; k < 4; k++) gb[k] = gate(tb[k], ma, k);
    for (int j = 0; j < 4; j++) begin
      case (ch.mcb[j])
        0: out[j] = ma[j];
        1: out[j] = gb[j];
        2: out[j] = ri_b[j%3];
        default: out[j] = gb[(j+1)%4];
      endcase
    end
    gb_o = gb;
  endfunction

  // A whole row given the LUT outputs of all 32 SRLs.
  function automatic logic [31:0] row_eval(row_chal_t ch, logic [31:0] s);
    logic [7:0][3:0] ga, gb, out, tmp;
    logic [2:0] ria, rib;
    // first pass: gate row A outputs only depend on s
    for (int c = 0; c < 8; c++)
      module_eval(c, ch.cols[c], s[4*c +: 4], 3'b0, 3'b0, ga[c], tmp[c], gb[c]);
    // second pass: RFM_B needs ri_a, then third pass for ri_b
    for (int c = 0; c < 8; c++) begin
      ria = ga[(c+1)%8][3:1];
      module_eval(c, ch.cols[c], s[4*c +: 4], ria, 3'b0, ga[c], tmp[c], gb[c]);
    end
    for (int c = 0; c < 8; c++) begin
      logic [3:0] g2;
      ria = ga[(c+1)%8][3:1];
      rib = gb[(c+7)%8][3:1];
      module_eval(c, ch.cols[c], s[4*c +: 4], ria, rib, ga[c], out[c], g2);
    end
    return out;
  endfunction

  task automatic compare(string tag);
    logic [3:0] s, ga, o, gb;
    for (int k = 0; k < 4; k++) s[k] = lut(tdc, nsh[k]);
    module_eval(COL, chal, s, ri_a, ri_b, ga, o, gb);
    checks += 3;
    if (out !== o)       begin failures++; $display("FAIL %s out %b exp %b", tag, out, o); end
    if (ro_a !== ga[3:1]) begin failures++; $display("FAIL %s ro_a", tag); end
    if (ro_b !== gb[3:1]) begin failures++; $display("FAIL %s ro_b", tag); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      logic [3:0] m;
      chal = mod_chal_t'({$urandom, $urandom});
      tdc  = 1'($urandom);
      ri_a = 3'($urandom); ri_b = 3'($urandom);
      clk_in = '0; xn = 1;
      #1 init = 1; #1 init = 0; #1;
      for (int k = 0; k < 4; k++) nsh[k] = 0;
      compare("init");
      // rising edges on a random subset of shift clocks
      m = 4'($urandom);
      clk_in = m; #1;
      for (int k = 0; k < 4; k++) if (m[k]) nsh[k]++;
      compare("edge");
      // falling edges shift nothing
      clk_in = '0; #1;
      compare("fall");
      // xn = 0 inverts: the clocks rise now on every input that is low
      xn = 0; #1;
      for (int k = 0; k < 4; k++) nsh[k]++;
      compare("xn");
      // disable pulse: all clocks that are high shift once more
      sr_disable = 1; #1 sr_disable = 0; #1;
      for (int k = 0; k < 4; k++) nsh[k]++;
      compare("disable");
      // new neighbour inputs and selects only change combinational paths
      ri_a = 3'($urandom); ri_b = 3'($urandom);
      chal.mca = 8'($urandom); chal.mcb = 8'($urandom); #1;
      compare("mux");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
