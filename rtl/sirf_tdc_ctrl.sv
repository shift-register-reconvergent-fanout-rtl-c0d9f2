// sirf_tdc_ctrl: sequences the 2^samples_log2 timing samples of one path.
//
// For each sample: LAUNCH sets the launch FFs (the edge ripples through the
// netlist), WAIT holds for CAPTURE_DLY cycles, CAPTURE strobes the TDC's
// thermometer FFs, DIS pulses the shift-register disable for one cycle so
// that every shift register rotates back when it is released, and REL
// clears the launch FFs. A sample takes CAPTURE_DLY + 4 cycles. done pulses
// in the cycle after the last REL. The document names a TDC Control block
// only; this sequence, including the restore step, is this design's own.
module sirf_tdc_ctrl #(
  parameter int CAPTURE_DLY = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] samples_log2,
  output logic       launch_set,
  output logic       launch_clr,
  output logic       sr_disable,
  output logic       capture,
  output logic       busy,
  output logic       done
);

  typedef enum logic [2:0] {S_IDLE, S_LAUNCH, S_WAIT, S_CAPTURE, S_DIS, S_REL} state_t;

  state_t      state;
  logic [15:0] cnt;
  logic [7:0]  dly;
  logic [15:0] last_cnt;

  assign last_cnt = 16'((32'd1 << samples_log2) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      dly   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cnt   <= '0;
          state <= S_LAUNCH;
        end
        S_LAUNCH: begin
          dly   <= '0;
          state <= (CAPTURE_DLY > 0) ? S_WAIT : S_CAPTURE;
        end
        S_WAIT: begin
          dly <= dly + 8'd1;
          if (32'(dly) + 1 >= CAPTURE_DLY) state <= S_CAPTURE;
        end
        S_CAPTURE: state <= S_DIS;
        S_DIS:     state <= S_REL;
        S_REL: begin
          if (cnt == last_cnt) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            cnt   <= cnt + 16'd1;
            state <= S_LAUNCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign launch_set = (state == S_LAUNCH);
  assign capture    = (state == S_CAPTURE);
  assign sr_disable = (state == S_DIS);
  assign launch_clr = (state == S_REL);
  assign busy       = (state != S_IDLE);

  // A new measurement may only be requested while idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
