// sirf_tdc: thermometer flip-flops and decoder of the time-to-digital
// converter.
//
// The transition leaving the netlist runs into a carry-chain delay line
// (outside this RTL: its delay is a property of the FPGA fabric). On
// capture the TAPS tap outputs are sampled; XOR with the pre-transition
// level (polarity) gives a thermometer code whose ones mark the taps the
// edge has reached. The decoder counts the ones (tolerant of bubbles) and
// returns TAPS minus that count, so a slower path gives a larger number of
// carry-chain delay units. Counting ones instead of searching for the edge,
// the TAPS value and the orientation of the result are this design's
// choices; the document gives the carry chain, ThermFFs and Decoder.
//
// Timing: capture in cycle t, sample_valid and sample in cycle t+2.
module sirf_tdc #(
  parameter int TAPS = 2048,
  localparam int CW  = $clog2(TAPS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            capture,
  input  logic            polarity,
  input  logic [TAPS-1:0] taps,
  output logic [CW-1:0]   sample,
  output logic            sample_valid
);

  logic [TAPS-1:0] therm_q;
  logic            cap_d;
  logic [CW-1:0]   ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      therm_q <= '0;
      cap_d   <= 1'b0;
    end else begin
      cap_d <= capture;
      if (capture) therm_q <= taps ^ {TAPS{polarity}};
    end
  end

  always_comb begin
    ones = '0;
    for (int i = 0; i < TAPS; i++) ones += CW'(therm_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= cap_d;
      if (cap_d) sample <= CW'(TAPS) - ones;
    end
  end

endmodule
