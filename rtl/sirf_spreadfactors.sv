// sirf_spreadfactors: device side of the SpreadFactor step.
//
// For i = 0..2047 it reads DVD_c[i] and the server-supplied word
// SF[i] = {flip, sf[15:0]} and streams
//     DVD_cr[i] = flip ? -(DVD_c[i] - sf) : (DVD_c[i] - sf)
// (16-bit signed, 4 fractional bits, saturated) to BitGen. Subtracting the
// population median removes the bias of each path pair's design length; a
// random offset the server adds to sf spreads the values evenly; flip
// inverts pairs the server selected. The subtraction and the flip follow the
// document; carrying the flip decision as bit 16 of the SF word is this
// design's choice.
//
// Timing: one value per cycle; out_valid of index i two cycles after its
// read address; out_last marks index 2047, done pulses with it.
module sirf_spreadfactors (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic [10:0] raddr,
  input  logic [15:0] dvc_rdata,
  input  logic [16:0] sf_rdata,
  output logic        out_valid,
  output logic [10:0] out_idx,
  output logic signed [15:0] out_cr,
  output logic        out_last,
  output logic        busy,
  output logic        done
);

  logic        run, v1;
  logic [10:0] idx1;
  logic signed [17:0] d, r;

  assign raddr = idx1;
  assign d = 18'($signed(dvc_rdata)) - 18'($signed(sf_rdata[15:0]));
  assign r = sf_rdata[16] ? -d : d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      v1        <= 1'b0;
      idx1      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_cr    <= '0;
      out_last  <= 1'b0;
      done      <= 1'b0;
    end else begin
      // stage 0: issue address
      if (start) begin
        run  <= 1'b1;
        idx1 <= '0;
      end else if (run) begin
        if (idx1 == 11'd2047) run <= 1'b0;
        else                  idx1 <= idx1 + 11'd1;
      end
      v1 <= run;
      // stage 1: data of the address issued last cycle
      out_valid <= v1;
      out_last  <= v1 && !run;
      done      <= v1 && !run;
      if (v1) begin
        out_idx <= run ? idx1 - 11'd1 : idx1;
        if (r > 18'sd32767)       out_cr <= 16'sh7FFF;
        else if (r < -18'sd32768) out_cr <= -16'sh8000;
        else                      out_cr <= r[15:0];
      end
    end
  end

  assign busy = run | v1 | out_valid;

endmodule
