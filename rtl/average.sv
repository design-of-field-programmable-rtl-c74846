// average: mean of one quantity over the valid GPS receivers.
//
// On start the N inputs (already zero for invalid receivers) are added and
// the number of valid receivers is counted from gps_valid. The sum is then
// divided by that count with a restoring shift-subtract divider that produces
// one quotient bit per cycle, so division by 3 needs no special case. The
// quotient is truncated toward zero. With no valid receiver the result is 0.
//
// Timing: start is accepted while busy is low; done pulses SUM_W + 1 cycles
// later (38 cycles at the defaults) with avg valid from then until the next
// start. Summing the valid receivers and dividing by their number is the
// method of the original design; the divider and the truncation are this
// design's choices.
module average
  import gps_pkg::*;
#(
  parameter int unsigned N = NUM_GPS,
  parameter int unsigned W = VAL_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] vals [N],
  input  logic [N-1:0] gps_valid,
  output logic [W-1:0] avg,
  output logic         busy,
  output logic         done
);

  localparam int unsigned SUM_W = W + $clog2(N + 1);
  localparam int unsigned CNT_W = $clog2(N + 1);
  localparam int unsigned IDX_W = $clog2(SUM_W + 1);

  logic [SUM_W-1:0] sum_c;
  logic [CNT_W-1:0] cnt_c;

  always_comb begin
    sum_c = '0;
    cnt_c = '0;
    for (int i = 0; i < N; i++) begin
      sum_c = sum_c + SUM_W'(vals[i]);
      cnt_c = cnt_c + CNT_W'(gps_valid[i]);
    end
  end

  logic [SUM_W-1:0] dividend;   // shifts left; quotient bits enter at bit 0
  logic [CNT_W:0]   rem;
  logic [CNT_W-1:0] divisor;
  logic [IDX_W-1:0] step;
  logic [CNT_W:0]   trial;

  assign trial = {rem[CNT_W-1:0], dividend[SUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dividend <= '0;
      rem      <= '0;
      divisor  <= '0;
      step     <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      avg      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dividend <= sum_c;
          divisor  <= cnt_c;
          rem      <= '0;
          step     <= '0;
          busy     <= 1'b1;
        end
      end else if (step == IDX_W'(SUM_W)) begin
        busy <= 1'b0;
        done <= 1'b1;
        avg  <= (divisor == '0) ? '0 : W'(dividend);
      end else begin
        step <= step + 1'b1;
        if (trial >= {1'b0, divisor}) begin
          rem      <= trial - {1'b0, divisor};
          dividend <= {dividend[SUM_W-2:0], 1'b1};
        end else begin
          rem      <= trial;
          dividend <= {dividend[SUM_W-2:0], 1'b0};
        end
      end
    end
  end

endmodule
