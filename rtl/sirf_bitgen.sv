// sirf_bitgen: thresholding and XMR redundancy, the last step of the SiRF
// algorithm.
//
// Enrollment (mode = MODE_ENROLL): a value DVD_cr is strong when it lies
// strictly above +threshold or strictly below -threshold (threshold uses
// the same 4-bit fixed-point format); its bit is 1 above 0 and 0 below.
// Strong bits are gathered into groups of xmr bits of equal value: the
// first strong bit of a group sets the group's value, later strong bits
// with that value join it, strong bits with the other value are skipped.
// When a group holds xmr bits, its value leaves as one super-strong key
// bit. Each index gets a helper-data bit, 1 when its bit joined a group,
// written to the helper-data RAM and streamed out (hdo_*). On average a
// group consumes 2*xmr - 1 strong bits.
//
// Regeneration (mode = MODE_REGEN): the helper-data RAM says which indices
// were used; their bits are taken by sign only, in groups of xmr, and each
// group gives its majority as the key bit, so up to (xmr-1)/2 flipped bits
// per group are corrected. A final group with fewer than xmr bits gives no
// key bit in either mode. xmr = 0 behaves as 1 (thresholding only).
//
// The threshold rule follows the document; the way groups are formed and
// voted is this design's reading of the document's "2*XMR - 1 strong bits
// per super-strong bit".
//
// Timing: the input stream may carry one value per cycle; in_idx drives the
// helper-data read address directly, results (key_*, hdo_*, hd write)
// appear two cycles after the input; done pulses with the result of the
// in_last value.
module sirf_bitgen
  import sirf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  bg_mode_t    mode,
  input  logic [15:0] threshold,
  input  logic [3:0]  xmr,
  input  logic        in_valid,
  input  logic [10:0] in_idx,
  input  logic signed [15:0] in_cr,
  input  logic        in_last,
  output logic [10:0] hd_raddr,
  input  logic        hd_rdata,
  output logic        hd_we,
  output logic [10:0] hd_waddr,
  output logic        hd_wdata,
  output logic        key_valid,
  output logic        key_bit,
  output logic        hdo_valid,
  output logic        hdo_bit,
  output logic        done
);

  logic        v1, last1;
  logic [10:0] idx1;
  logic signed [15:0] cr1;
  logic [3:0]  cnt, ones, x;
  logic        val;
  logic signed [16:0] thr;
  logic        is_strong, bitv;

  assign hd_raddr = in_idx;
  assign x        = (xmr == 4'd0) ? 4'd1 : xmr;
  assign thr      = 17'(threshold);
  assign is_strong   = (17'(cr1) > thr) || (17'(cr1) < -thr);
  assign bitv     = cr1 > 0;

  // enrollment: does this value join the current group?
  logic       sel;
  logic [4:0] o;      // regeneration: ones in the group including this bit
  assign sel = is_strong && (cnt == 4'd0 || bitv == val);
  assign o   = 5'(ones) + 5'(bitv);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      last1     <= 1'b0;
      idx1      <= '0;
      cr1       <= '0;
      cnt       <= '0;
      ones      <= '0;
      val       <= 1'b0;
      hd_we     <= 1'b0;
      hd_waddr  <= '0;
      hd_wdata  <= 1'b0;
      key_valid <= 1'b0;
      key_bit   <= 1'b0;
      hdo_valid <= 1'b0;
      hdo_bit   <= 1'b0;
      done      <= 1'b0;
    end else begin
      hd_we     <= 1'b0;
      key_valid <= 1'b0;
      hdo_valid <= 1'b0;
      done      <= 1'b0;
      v1    <= in_valid;
      last1 <= in_valid && in_last;
      if (in_valid) begin
        idx1 <= in_idx;
        cr1  <= in_cr;
      end
      if (start) begin
        cnt  <= '0;
        ones <= '0;
      end else if (v1) begin
        done <= last1;
        if (mode == MODE_ENROLL) begin
          hd_we     <= 1'b1;
          hd_waddr  <= idx1;
          hd_wdata  <= sel;
          hdo_valid <= 1'b1;
          hdo_bit   <= sel;
          if (sel) begin
            if (cnt == 4'd0) val <= bitv;
            if (cnt + 4'd1 == x) begin
              key_valid <= 1'b1;
              key_bit   <= (cnt == 4'd0) ? bitv : val;
              cnt       <= '0;
            end else begin
              cnt <= cnt + 4'd1;
            end
          end
        end else if (hd_rdata) begin
          if (cnt + 4'd1 == x) begin
            key_valid <= 1'b1;
            key_bit   <= (o << 1) > 5'(x);
            cnt       <= '0;
            ones      <= '0;
          end else begin
            cnt  <= cnt + 4'd1;
            ones <= o[3:0];
          end
        end
      end
    end
  end

endmodule
