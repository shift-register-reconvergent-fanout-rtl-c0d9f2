// tb_sirf_row: random row challenges and random subsets of the 32 shift
// clocks; the 32 row outputs are compared with a reference model that
// evaluates every module and the ring wires between columns independently
// of the RTL.
module tb_sirf_row;
  import sirf_pkg::*;
  logic init = 0, sr_disable = 0, xn = 1;
  logic [31:0] clk_in = '0, out;
  row_chal_t chal;
  int nsh [32];
  int checks = 0, failures = 0;

  sirf_row dut (.init, .sr_disable, .clk_in, .xn, .chal, .out);
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
    logic [31:0] s, o;
    for (int k = 0; k < 32; k++) s[k] = lut(chal.tdc, nsh[k]);
    o = row_eval(chal, s);
    checks++;
    if (out !== o) begin failures++; $display("FAIL %s out %h exp %h", tag, out, o); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      logic [31:0] m;
      for (int w = 0; w < 9; w++) chal[w*32 +: 32] = $urandom;
      chal.tdc = 1'($urandom);
      clk_in = '0;
      #1 init = 1; #1 init = 0; #1;
      for (int k = 0; k < 32; k++) nsh[k] = 0;
      compare("init");
      if (out !== {32{chal.tdc}}) begin failures++; $display("FAIL idle level"); end
      checks++;
      m = $urandom;
      clk_in = m; #1;
      for (int k = 0; k < 32; k++) if (m[k]) nsh[k]++;
      compare("subset");
      clk_in = '1; #1;
      for (int k = 0; k < 32; k++) if (!m[k]) nsh[k]++;
      compare("all");
      // every LUT has moved once: every output has made its transition
      checks++;
      if (out !== {32{~chal.tdc}}) begin failures++; $display("FAIL full transition"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
