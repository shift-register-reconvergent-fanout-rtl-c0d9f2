// sirf_divider: sequential unsigned restoring divider, one quotient bit per
// cycle. start loads num and den; done pulses NW + 1 cycles later with
// quo = num / den (truncated). den = 0 gives an all-ones quotient; callers
// avoid it. Used by GPEVCal to divide by the range of the DVD distribution.
module sirf_divider #(
  parameter int NW = 34,
  parameter int DW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic [NW-1:0] quo,
  output logic          busy,
  output logic          done
);

  logic [DW-1:0] rem;
  logic [DW:0]   rem_sh, rem_sub;
  logic [DW-1:0] d;
  logic [$clog2(NW+1)-1:0] n;

  assign rem_sh  = {rem, quo[NW-1]};
  assign rem_sub = rem_sh - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      quo  <= '0;
      d    <= '0;
      n    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= '0;
        quo  <= num;
        d    <= den;
        n    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (rem_sh >= {1'b0, d}) begin
          rem <= rem_sub[DW-1:0];
          quo <= {quo[NW-2:0], 1'b1};
        end else begin
          rem <= rem_sh[DW-1:0];
          quo <= {quo[NW-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (32'(n) == NW - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
