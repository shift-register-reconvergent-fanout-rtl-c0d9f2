// sirf_netlist: the engineered SiRF path network.
//
// 32 launch flip-flops (D = 1) drive the shift clocks of row 2 through XNOR
// gates whose other input is 1. Each row's 32 outputs clock the next row's
// shift registers through XNORs fed with the complement of that row's
// direction bit, which turns falling outputs into rising clocks. Row 0's
// outputs go to a 32-to-1 MUX (path_sel) whose output path_out drives the
// TDC. Rows, columns, launch FFs and the path-select MUX follow the document.
//
// One measurement: with the launch FFs clear and the shift registers in
// their initial pattern, every module output sits at the row's direction
// bit and every shift clock is low, whatever the challenge. launch_set makes
// all launch FFs rise; every shift register of row 2 rotates once, its
// outputs all move, row 1 and then row 0 follow, and path_out makes one
// transition (rising if row 0's direction bit is 0). In silicon the delay of
// that transition depends on which gates the challenge put on the path; this
// RTL is zero-delay and gives the logic only.
//
// Restore (this design's choice, not described in the document): with the
// launch FFs still set, a one-cycle pulse on sr_disable drops and raises
// every shift clock together, rotating every register back; launch_clr then
// clears the launch FFs. init reloads all patterns.
module sirf_netlist
  import sirf_pkg::*;
(
  input  logic              clk,
  input  logic              init,
  input  logic              launch_set,
  input  logic              launch_clr,
  input  logic              sr_disable,
  input  net_chal_t         chal,
  input  logic [4:0]        path_sel,
  output logic              path_out
);

  logic [NPATHS-1:0] launch_q;
  logic [NROWS:0][NPATHS-1:0] edge_in;   // edge_in[r+1] feeds row r
  logic [NROWS:1]             xn;     // xn[r+1] feeds row r

  always_ff @(posedge clk or posedge init) begin
    if (init)            launch_q <= '0;
    else if (launch_clr) launch_q <= '0;
    else if (launch_set) launch_q <= '1;
  end

  assign edge_in[NROWS] = launch_q;
  assign xn[NROWS]      = 1'b1;

  for (genvar r = NROWS-1; r >= 0; r--) begin : g_row
    sirf_row u_row (
      .init      (init),
      .sr_disable(sr_disable),
      .clk_in    (edge_in[r+1]),
      .xn        (xn[r+1]),
      .chal      (chal.rows[r]),
      .out       (edge_in[r])
    );
    if (r > 0) begin : g_xn
      assign xn[r] = ~chal.rows[r].tdc;
    end
  end

  assign path_out = edge_in[0][path_sel];

endmodule
