// sirf_lfsr11: 11-bit LFSR with a full 2048-state cycle.
//
// A Fibonacci LFSR on x^11 + x^9 + 1 (shift left, feedback = q[10] ^ q[8])
// visits the 2047 non-zero states; XORing the feedback with (q[9:0] == 0)
// inserts the all-zero state between 100..0 and 00..01, so any seed walks
// through all 2048 indices. The document asks for a primitive 11-bit LFSR
// whose seed pairs all 2048 rising with all 2048 falling delays; the
// polynomial and the zero-state insertion are this design's choice.
// load has priority over step; q changes on the clock edge.
module sirf_lfsr11 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [10:0] seed,
  input  logic        step,
  output logic [10:0] q
);

  logic fb;
  assign fb = q[10] ^ q[8] ^ (q[9:0] == 10'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= seed;
    else if (step) q <= {q[9:0], fb};
  end

endmodule
