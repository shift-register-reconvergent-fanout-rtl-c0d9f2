// sirf_gpevcal: global process and environmental variation calibration.
//
// Pass 1 reads all 2048 DVD (16-bit signed, 4 fractional bits) and
// accumulates their sum, minimum and maximum. The mean is sum / 2048
// (arithmetic shift, rounded down) and the range is max - min. Pass 2
// rewrites every value as
//     DVD_c = (DVD - mean) / range * rc
// kept with 4 fractional bits: trunc(|DVD - mean| * rc * 16 / range) with the
// sign of DVD - mean, saturated to 16-bit signed; a zero range gives 0.
// This normalises away chip-to-chip speed differences and most of the
// temperature/voltage drift, and rc (128 in the document's example) spreads
// the result around 0. The two transformations follow the document; the
// fixed-point format of the result, the rounding and the sequential divider
// are this design's choices.
//
// Timing: pass 1 takes 2049 cycles, pass 2 about 39 cycles per value
// (read, divide, write); done pulses after the last write.
module sirf_gpevcal (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] rc,
  output logic [10:0] dvd_raddr,
  input  logic [15:0] dvd_rdata,
  output logic        dvc_we,
  output logic [10:0] dvc_waddr,
  output logic [15:0] dvc_wdata,
  output logic        busy,
  output logic        done
);

  localparam int NW = 34;
  localparam int DW = 17;

  typedef enum logic [2:0] {S_IDLE, S_P1, S_P1_END, S_RD, S_DAT, S_DIV, S_WAIT} state_t;

  state_t              state;
  logic [10:0]         i;
  logic                v1;          // pass-1 read data valid
  logic signed [26:0]  sum;
  logic signed [15:0]  vmin, vmax, mu;
  logic [DW-1:0]       range;
  logic signed [17:0]  diff;
  logic                neg;
  logic [NW-1:0]       num, quo;
  logic                div_start, div_done;
  logic [17:0]         absd;
  logic signed [15:0]  x;

  assign x    = $signed(dvd_rdata);

  // statistics including the value on the read port
  logic signed [26:0] s2;
  logic signed [15:0] mn, mx;
  assign s2 = sum + 27'(x);
  assign mn = (x < vmin) ? x : vmin;
  assign mx = (x > vmax) ? x : vmax;
  assign diff = 18'(x) - 18'(mu);
  assign absd = (diff < 0) ? 18'(-diff) : 18'(diff);

  sirf_divider #(.NW(NW), .DW(DW)) u_div (
    .clk, .rst_n, .start(div_start), .num, .den(range),
    .quo, .busy(), .done(div_done)
  );

  logic [15:0] mag;
  assign mag = (quo > NW'(32767)) ? 16'd32767 : quo[15:0];

  assign dvd_raddr = i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      i         <= '0;
      v1        <= 1'b0;
      sum       <= '0;
      vmin      <= '0;
      vmax      <= '0;
      mu        <= '0;
      range     <= '0;
      neg       <= 1'b0;
      num       <= '0;
      div_start <= 1'b0;
      dvc_we    <= 1'b0;
      dvc_waddr <= '0;
      dvc_wdata <= '0;
      done      <= 1'b0;
    end else begin
      dvc_we    <= 1'b0;
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i     <= '0;
          sum   <= '0;
          vmin  <= 16'sh7FFF;
          vmax  <= -16'sh8000;
          v1    <= 1'b0;
          state <= S_P1;
        end
        // Pass 1: address i issued, data of i-1 arrives (v1).
        S_P1: begin
          if (v1) begin
            sum  <= s2;
            vmin <= mn;
            vmax <= mx;
          end
          v1    <= 1'b1;
          i     <= i + 11'd1;
          if (i == 11'd2047) state <= S_P1_END;
        end
        S_P1_END: begin
          // the last value (index 2047) arrives now
          mu    <= 16'(s2 >>> 11);
          range <= DW'(17'(mx) - 17'(mn));
          i     <= '0;
          state <= S_RD;
        end
        // Pass 2
        S_RD:  state <= S_DAT;
        S_DAT: begin
          neg <= diff < 0;
          num <= NW'(absd) * NW'(rc) * NW'(16);
          state <= S_DIV;
        end
        S_DIV: begin
          if (range == '0) begin
            dvc_we    <= 1'b1;
            dvc_waddr <= i;
            dvc_wdata <= '0;
            state     <= S_WAIT;
          end else begin
            div_start <= 1'b1;
            state     <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (range == '0 || div_done) begin
            if (range != '0) begin
              dvc_we    <= 1'b1;
              dvc_waddr <= i;
              dvc_wdata <= neg ? -mag : mag;
            end
            i <= i + 11'd1;
            if (i == 11'd2047) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
