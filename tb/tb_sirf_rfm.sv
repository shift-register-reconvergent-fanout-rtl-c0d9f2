// tb_sirf_rfm: exhaustive check of the gate row for two gate assignments.
module tb_sirf_rfm;
  import sirf_pkg::*;
  logic [3:0] x, y1, y2;
  int checks = 0, failures = 0;

  sirf_rfm #(.GATES({G_AO, G_AND, G_OR, G_AND})) dut1 (.x, .y(y1));
  sirf_rfm #(.GATES({G_AO, G_OR, G_AO, G_AO}))   dut2 (.x, .y(y2));

  function automatic logic g(gate_t t, logic [3:0] v, int k);
    logic a, b, c;
    a = v[k]; b = v[(k+1)%4]; c = v[(k+2)%4];
    if (t == G_AND) return a & b;
    if (t == G_OR)  return a | b;
    return (a & b) | c;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate_t t1 [4], t2 [4];
    t1 = '{G_AND, G_OR, G_AND, G_AO};
    t2 = '{G_AO, G_AO, G_OR, G_AO};
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (y1[k] !== g(t1[k], x, k)) begin failures++; $display("FAIL dut1 x=%b k=%0d", x, k); end
        if (y2[k] !== g(t2[k], x, k)) begin failures++; $display("FAIL dut2 x=%b k=%0d", x, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
