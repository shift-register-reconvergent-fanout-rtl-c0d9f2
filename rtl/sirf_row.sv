// sirf_row: one row of eight SiRF modules and the wires between them.
//
// The signals ro_a (three per module) travel one column down (column c to
// column c-1) and ro_b travel one column up (c to c+1), both wrapping
// around, so the first and second gate rows spread paths across the row in
// opposite directions, much like the row shift of a block cipher. Bit
// 4*c + j of clk_in/out belongs to SRL j of column c. The column count and
// module content follow the document; the wrap-around is this design's
// reading of the drawing.
module sirf_row
  import sirf_pkg::*;
(
  input  logic              init,
  input  logic              sr_disable,
  input  logic [NPATHS-1:0] clk_in,
  input  logic              xn,
  input  row_chal_t         chal,
  output logic [NPATHS-1:0] out
);

  logic [NCOLS-1:0][2:0] ro_a, ro_b, ri_a, ri_b;

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    assign ri_a[c] = ro_a[(c+1) % NCOLS];
    assign ri_b[c] = ro_b[(c+NCOLS-1) % NCOLS];

    sirf_module #(.COL(c)) u_mod (
      .init      (init),
      .sr_disable(sr_disable),
      .clk_in    (clk_in[4*c +: 4]),
      .xn        (xn),
      .chal      (chal.cols[c]),
      .tdc       (chal.tdc),
      .ri_a      (ri_a[c]),
      .ri_b      (ri_b[c]),
      .ro_a      (ro_a[c]),
      .ro_b      (ro_b[c]),
      .out       (out[4*c +: 4])
    );
  end

endmodule
