// sirf_dvdiff: the Difference module.
//
// The DV memory holds 2048 rising-path delays (DV_R, addresses 0..2047) and
// 2048 falling-path delays (DV_F, 2048..4095). Two 11-bit LFSRs, loaded
// with seed_r and seed_f, pick one DV_R and one DV_F per step; their
// difference DVD_k = DV_R - DV_F (saturated to 16-bit signed, same 4-bit
// fraction) is written to DVD address k for k = 0..2047. Since each LFSR
// visits every index once, one seed pair pairs every DV_R with exactly one
// DV_F, and the 2^22 seed pairs give different pairings. Following the
// document: two seeded 11-bit LFSRs and 2048 differences; this design's
// choice: the memory layout and three cycles per difference (two reads of
// the single read port, one write).
module sirf_dvdiff (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [10:0] seed_r,
  input  logic [10:0] seed_f,
  output logic [11:0] dv_raddr,
  input  logic [15:0] dv_rdata,
  output logic        dvd_we,
  output logic [10:0] dvd_waddr,
  output logic [15:0] dvd_wdata,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {S_IDLE, S_RD_R, S_RD_F, S_WR} state_t;

  state_t        state;
  logic [10:0]   k;
  logic [10:0]   lr, lf;
  logic [15:0]   dvr;
  logic signed [17:0] diff;
  logic          step;

  sirf_lfsr11 u_lfsr_r (.clk, .rst_n, .load(start), .seed(seed_r), .step, .q(lr));
  sirf_lfsr11 u_lfsr_f (.clk, .rst_n, .load(start), .seed(seed_f), .step, .q(lf));

  assign step = (state == S_WR);
  assign diff = $signed({2'b00, dvr}) - $signed({2'b00, dv_rdata});

  always_comb begin
    dv_raddr = {1'b0, lr};
    if (state == S_RD_F) dv_raddr = {1'b1, lf};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      dvr       <= '0;
      dvd_we    <= 1'b0;
      dvd_waddr <= '0;
      dvd_wdata <= '0;
      done      <= 1'b0;
    end else begin
      dvd_we <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k     <= '0;
          state <= S_RD_R;
        end
        S_RD_R: state <= S_RD_F;
        S_RD_F: begin
          dvr   <= dv_rdata;
          state <= S_WR;
        end
        S_WR: begin
          dvd_we    <= 1'b1;
          dvd_waddr <= k;
          if (diff > 18'sd32767)       dvd_wdata <= 16'h7FFF;
          else if (diff < -18'sd32768) dvd_wdata <= 16'h8000;
          else                         dvd_wdata <= diff[15:0];
          k <= k + 11'd1;
          if (k == 11'd2047) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_RD_R;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
