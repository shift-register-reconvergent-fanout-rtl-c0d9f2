// sirf_storage: averages the TDC samples of one path into a fixed-point DV
// and writes it to the DV block RAM.
//
// start latches the DV index and clears the accumulator; each sample_valid
// adds one sample. After 2^samples_log2 samples the average is written with
// FRAC fractional bits: wdata = (sum << FRAC) >> samples_log2, saturated to
// DV_W bits (fraction truncated). we and done pulse together one cycle
// after the last sample. The 16-bit format with 4 fractional bits follows
// the document; taking the sample count as a power of two is this design's
// choice.
module sirf_storage #(
  parameter int DV_W = 16,
  parameter int FRAC = 4,
  parameter int SW   = 12,      // TDC sample width
  parameter int AW   = 12       // DV address width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [AW-1:0]   idx,
  input  logic [3:0]      samples_log2,
  input  logic            sample_valid,
  input  logic [SW-1:0]   sample,
  output logic            we,
  output logic [AW-1:0]   waddr,
  output logic [DV_W-1:0] wdata,
  output logic            done
);

  localparam int ACC_W = SW + 15 + FRAC;

  logic [ACC_W-1:0] acc, acc_next, avg;
  logic [15:0]      cnt;

  assign acc_next = acc + ACC_W'(sample);
  assign avg      = (acc_next << FRAC) >> samples_log2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      cnt   <= '0;
      we    <= 1'b0;
      done  <= 1'b0;
      waddr <= '0;
      wdata <= '0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      if (start) begin
        acc   <= '0;
        cnt   <= '0;
        waddr <= idx;
      end else if (sample_valid) begin
        acc <= acc_next;
        cnt <= cnt + 16'd1;
        if (32'(cnt) + 1 == (32'd1 << samples_log2)) begin
          we    <= 1'b1;
          done  <= 1'b1;
          wdata <= (avg > ACC_W'({DV_W{1'b1}})) ? {DV_W{1'b1}} : avg[DV_W-1:0];
        end
      end
    end
  end

endmodule
