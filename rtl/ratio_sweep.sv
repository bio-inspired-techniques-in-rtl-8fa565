// Background ratio calculator for the display and accuracy outputs.
//
// Holds, for each of N entries, an 8-bit level equal to num/den scaled to
// 0..255, i.e. min(255, floor(256*num/den)), and 0 when den is 0. Entries are
// refreshed one after another in an endless sweep, each by an 8-step restoring
// division, so one entry takes 10 clock cycles and the whole table N*10
// cycles. The inputs must satisfy num <= den (a count never exceeds its
// total); the level is then a fraction of full scale. This is a helper of this
// implementation: the design needs percentages (accuracy per neuron and class,
// share of '1' responses per filter) but does not say how they are computed.
module ratio_sweep #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      num [N],
  input  logic [W-1:0]      den [N],
  output logic [7:0]        lvl [N]
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] idx;
  logic [3:0]    step;      // 0: load, 1..8: quotient bits, 9: store
  logic [W:0]    rem;
  logic [W-1:0]  dsr;
  logic [8:0]    quo;
  logic [W:0]    rem2;

  assign rem2 = {rem[W-1:0], 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      step <= '0;
      rem  <= '0;
      dsr  <= '0;
      quo  <= '0;
      for (int i = 0; i < N; i++) lvl[i] <= '0;
    end else begin
      unique case (step)
        4'd0: begin
          rem  <= {1'b0, num[idx]};
          dsr  <= den[idx];
          quo  <= '0;
          step <= 4'd1;
        end
        4'd9: begin
          if (dsr == '0)        lvl[idx] <= 8'd0;
          else if (quo[8])      lvl[idx] <= 8'd255;
          else                  lvl[idx] <= quo[7:0];
          idx  <= (idx == IW'(N-1)) ? '0 : idx + 1'b1;
          step <= 4'd0;
        end
        default: begin
          // First step may see num == den, giving the integer bit quo[8].
          if (step == 4'd1 && rem >= {1'b0, dsr} && dsr != '0) begin
            // num == den: result saturates to full scale.
            quo  <= 9'h100;
            rem  <= '0;
          end else if (rem2 >= {1'b0, dsr}) begin
            rem  <= rem2 - {1'b0, dsr};
            quo  <= {quo[7:0], 1'b1} | (quo & 9'h100);
          end else begin
            rem  <= rem2;
            quo  <= {quo[7:0], 1'b0} | (quo & 9'h100);
          end
          step <= step + 4'd1;
        end
      endcase
    end
  end
endmodule
