// sirf_module: one module of the SiRF netlist (one row, one column).
//
// Four XNOR gates turn the incoming edges into shift clocks for four
// shift-register LUTs (sirf_srl). The LUT outputs feed both the first gate
// row (RFM_A) and, directly, the first four 4-to-1 MUXs; the RFM_A outputs
// go to those MUXs too and, through ro_a, to a neighbouring module. In the
// same (dual) way the MUX outputs feed both the second gate row (RFM_B) and
// the second four MUXs, and RFM_B's outputs go to those MUXs and, through
// ro_b, to the other neighbour. Each MUX also sees one signal arriving from
// a neighbour (ri_a, ri_b), so a path can leave the module and come back
// through another one. MUX inputs 0..3: MUX_A j = {LUT j, gA[j], ri_a[j%3],
// gA[j+1]}, MUX_B j = {MUX_A j, gB[j], ri_b[j%3], gB[j+1]} (indices mod 4).
//
// Following the document: 4 XNOR + 4 SRL + 4 gates + 4 MUX + 4 gates +
// 4 MUX, 3 + 3 signals exchanged with neighbours, 16 + 16 challenge bits and
// the row's transition-direction bit, and LUT outputs reaching the first
// MUXs as well as the gates. This design's own choice: which gate
// and neighbour signal drives each MUX input, and the gate kinds (see
// sirf_pkg::rfm_a_gate / rfm_b_gate).
//
// xn is the second XNOR input: constant 1 in the first row, and the
// complement of the previous row's direction bit elsewhere, so that the
// previous row's rising or falling outputs reach the shift clocks as rising
// edges. All gates are non-inverting, so once every LUT of the row makes its
// transition, every module output makes the same transition. Zero-delay,
// combinational apart from the SRL state.
module sirf_module
  import sirf_pkg::*;
#(
  parameter int COL = 7
) (
  input  logic        init,
  input  logic        sr_disable,
  input  logic [3:0]  clk_in,
  input  logic        xn,
  input  mod_chal_t   chal,
  input  logic        tdc,
  input  logic [2:0]  ri_a,
  input  logic [2:0]  ri_b,
  output logic [2:0]  ro_a,
  output logic [2:0]  ro_b,
  output logic [3:0]  out
);

  localparam gate_t [3:0] GA = {rfm_a_gate(3), rfm_a_gate(2), rfm_a_gate(1), rfm_a_gate(0)};
  localparam gate_t [3:0] GB = {rfm_b_gate(COL, 3), rfm_b_gate(COL, 2),
                                rfm_b_gate(COL, 1), rfm_b_gate(COL, 0)};

  logic [3:0] sclk, s, ga, ma, gb;

  assign sclk = ~(clk_in ^ {4{xn}});

  for (genvar k = 0; k < NSRL; k++) begin : g_srl
    sirf_srl u_srl (
      .path_in  (sclk[k]),
      .disable_i(sr_disable),
      .init     (init),
      .src      (chal.src[k]),
      .tdc      (tdc),
      .path_out (s[k])
    );
  end

  sirf_rfm #(.GATES(GA)) u_rfm_a (.x(s),  .y(ga));
  sirf_rfm #(.GATES(GB)) u_rfm_b (.x(ma), .y(gb));

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      unique case (chal.mca[j])
        2'd0: ma[j] = s[j];
        2'd1: ma[j] = ga[j];
        2'd2: ma[j] = ri_a[j%3];
        2'd3: ma[j] = ga[(j+1)%4];
      endcase
      unique case (chal.mcb[j])
        2'd0: out[j] = ma[j];
        2'd1: out[j] = gb[j];
        2'd2: out[j] = ri_b[j%3];
        2'd3: out[j] = gb[(j+1)%4];
      endcase
    end
  end

  assign ro_a = ga[3:1];
  assign ro_b = gb[3:1];

endmodule
