// integer_to_ascii: converts an unsigned integer to DIGITS ASCII decimal
// characters with the double dabble (shift-and-add-3) algorithm.
//
// On start the value is loaded into the low part of a shift register whose
// upper part holds DIGITS 4-bit BCD digits, all zero. Each cycle every BCD
// digit of 5 or more is first increased by 3, and then the whole register is
// shifted left by one bit. After W shifts the upper part holds the decimal
// digits of the value. Each digit is turned into its ASCII code by placing
// 0011 above it (0x30 + digit). ascii[0] is the most significant digit;
// leading zeros are kept, so the width is always DIGITS characters.
//
// Timing: start is accepted while busy is low; done_conv pulses W + 1 cycles
// later (35 cycles at the defaults) and ascii holds the result until the next
// start. The algorithm and the 0011 prefix follow the original design; the
// one-shift-per-cycle schedule is this design's choice.
module integer_to_ascii
  import gps_pkg::*;
#(
  parameter int unsigned W      = VAL_W,
  parameter int unsigned NDIGIT = DIGITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [W-1:0]           value,
  output logic [NDIGIT-1:0][7:0] ascii,     // ascii[0] is the leading digit
  output logic                   busy,
  output logic                   done_conv
);

  localparam int unsigned IDX_W = $clog2(W + 1);

  logic [NDIGIT*4-1:0] bcd;
  logic [W-1:0]        bin;
  logic [IDX_W-1:0]    step;
  logic [NDIGIT*4-1:0] bcd_adj;

  // Add 3 to every digit of 5 or more before the shift.
  always_comb begin
    for (int d = 0; d < NDIGIT; d++) begin
      bcd_adj[d*4 +: 4] = (bcd[d*4 +: 4] >= 4'd5) ? bcd[d*4 +: 4] + 4'd3
                                                  : bcd[d*4 +: 4];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcd       <= '0;
      bin       <= '0;
      step      <= '0;
      busy      <= 1'b0;
      done_conv <= 1'b0;
      ascii     <= '0;
    end else begin
      done_conv <= 1'b0;
      if (!busy) begin
        if (start) begin
          bcd  <= '0;
          bin  <= value;
          step <= '0;
          busy <= 1'b1;
        end
      end else if (step == IDX_W'(W)) begin
        busy      <= 1'b0;
        done_conv <= 1'b1;
        for (int d = 0; d < NDIGIT; d++) begin
          ascii[NDIGIT-1-d] <= {4'b0011, bcd[d*4 +: 4]};
        end
      end else begin
        {bcd, bin} <= {bcd_adj[NDIGIT*4-2:0], bin, 1'b0};
        step       <= step + 1'b1;
      end
    end
  end

endmodule
