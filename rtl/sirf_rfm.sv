// sirf_rfm: one row of four non-inverting gates of a reconvergent-fanout
// module (RFM_A or RFM_B).
//
// Gate k reads x[k] and x[k+1] (AND or OR) or x[k], x[k+1], x[k+2]
// (AND-OR), indices modulo 4, so each input fans out to two or three gates
// and paths reconverge further down. The gate kinds are parameters; the
// document names AND, OR and AND-OR gates, the choice per position is this
// design's. Purely combinational.
module sirf_rfm
  import sirf_pkg::*;
#(
  parameter gate_t [3:0] GATES = {G_AO, G_AND, G_OR, G_AND}
) (
  input  logic [3:0] x,
  output logic [3:0] y
);

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      unique case (GATES[k])
        G_AND:   y[k] = x[k] & x[(k+1)%4];
        G_OR:    y[k] = x[k] | x[(k+1)%4];
        default: y[k] = (x[k] & x[(k+1)%4]) | x[(k+2)%4];
      endcase
    end
  end

endmodule
