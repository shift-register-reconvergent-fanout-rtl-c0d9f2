// sirf_srl: one 32-bit shift-register LUT of the SiRF netlist (an SRL32).
//
// The register holds the pattern 0101...01 (bit 0 = 0, bit 1 = 1, ...).
// A rising edge on the shift clock rotates it by one position (bit i takes
// bit i-1, bit 0 takes bit 31), so every bit toggles and the addressed
// output makes exactly one transition: rising for even addresses, falling
// for odd ones. The address is {src[3:0], tdc}; the low bit is the row's
// transition-direction bit, so every LUT of a row moves the same way.
//
// The shift clock is path_in passed through a 2:1 mux whose other input is
// 0, selected by disable_i, as printed in the netlist drawing. init reloads
// the pattern asynchronously (the FPGA does this at configuration; using a
// pin for it is this design's choice). The shift clock is a data signal of
// the netlist by design: the PUF times the path through the clock pin.
module sirf_srl #(
  parameter logic [31:0] INIT = 32'hAAAA_AAAA
) (
  input  logic       path_in,
  input  logic       disable_i,
  input  logic       init,
  input  logic [3:0] src,
  input  logic       tdc,
  output logic       path_out
);

  logic [31:0] bits;
  logic        sclk;

  assign sclk = disable_i ? 1'b0 : path_in;

  always_ff @(posedge sclk or posedge init) begin
    if (init) bits <= INIT;
    else      bits <= {bits[30:0], bits[31]};
  end

  assign path_out = bits[{src, tdc}];

endmodule
