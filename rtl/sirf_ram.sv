// sirf_ram: simple dual-port block RAM (one write port, one read port,
// one clock). The read data appears in the cycle after raddr. A write and a
// read of the same address in one cycle return the old word. The contents
// are not reset. Used for the DV, DVD, DVD_c, SpreadFactor and helper-data
// memories; splitting the single BRAM of the architecture into five arrays
// is this design's choice.
module sirf_ram #(
  parameter int DEPTH = 4096,
  parameter int WIDTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
