// sirf_control: the sequencer of one SiRF iteration.
//
// On start it optionally measures all N_DV paths (do_timing): for each DV
// index it raises chal_req with chal_idx and waits for chal_valid, pulses
// chal_load so the top latches the configuration vector and path select,
// then starts the TDC controller and the storage module together and waits
// for the DV to be written. It then runs the Difference module, GPEVCal,
// and the SpreadFactor + BitGen stream, each to completion, and pulses done.
// Later iterations of a key can skip the timing and only change the LFSR
// seeds, as in the document; the handshake and the phase order are this
// design's choice.
module sirf_control #(
  parameter int N_DV = 4096,
  localparam int AW  = $clog2(N_DV)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          do_timing,
  output logic          chal_req,
  output logic [AW-1:0] chal_idx,
  input  logic          chal_valid,
  output logic          chal_load,
  output logic          meas_start,   // to TDC control and storage
  input  logic          dv_done,      // storage wrote the DV
  output logic          diff_start,
  input  logic          diff_done,
  output logic          cal_start,
  input  logic          cal_done,
  output logic          sfb_start,    // SpreadFactors and BitGen
  input  logic          bg_done,
  output logic          busy,
  output logic          done
);

  typedef enum logic [3:0] {
    S_IDLE, S_T_REQ, S_T_RUN, S_T_WAIT, S_DIFF, S_DIFF_W, S_CAL, S_CAL_W, S_SFB, S_SFB_W
  } state_t;

  state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      chal_idx <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          chal_idx <= '0;
          state    <= do_timing ? S_T_REQ : S_DIFF;
        end
        S_T_REQ:  if (chal_valid) state <= S_T_RUN;
        S_T_RUN:  state <= S_T_WAIT;
        S_T_WAIT: if (dv_done) begin
          if (32'(chal_idx) == N_DV - 1) begin
            state <= S_DIFF;
          end else begin
            chal_idx <= chal_idx + 1'b1;
            state    <= S_T_REQ;
          end
        end
        S_DIFF:   state <= S_DIFF_W;
        S_DIFF_W: if (diff_done) state <= S_CAL;
        S_CAL:    state <= S_CAL_W;
        S_CAL_W:  if (cal_done) state <= S_SFB;
        S_SFB:    state <= S_SFB_W;
        S_SFB_W:  if (bg_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign chal_req   = (state == S_T_REQ);
  assign chal_load  = (state == S_T_REQ) && chal_valid;
  assign meas_start = (state == S_T_RUN);
  assign diff_start = (state == S_DIFF);
  assign cal_start  = (state == S_CAL);
  assign sfb_start  = (state == S_SFB);
  assign busy       = (state != S_IDLE);

endmodule
