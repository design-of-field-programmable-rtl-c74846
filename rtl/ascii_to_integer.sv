// ascii_to_integer: converts one ASCII decimal field to an unsigned
// fixed-point integer with FRAC implied fraction digits.
//
// The characters are scanned in order. Digits before the decimal point are
// accumulated as value = value * 10 + digit; after the point at most FRAC
// further digits are taken and the rest dropped (truncation). If fewer than
// FRAC fraction digits were present the result is scaled up by ten for each
// missing one, so "469" and "469.0" both give 4690 for FRAC = 1. Characters
// other than digits and the first point are ignored, so a sign is not
// represented. An empty field gives 0.
//
// The block is purely combinational: value follows field in the same cycle.
// Converting ASCII to integer is the function given by the original design; the fixed-point
// reading of the decimal point is this design's choice.
module ascii_to_integer
  import gps_pkg::*;
#(
  parameter int unsigned FRAC = 0,
  parameter int unsigned W    = VAL_W
) (
  input  ascii_field_t field,
  output logic [W-1:0] value
);

  always_comb begin
    logic [W-1:0] acc;
    logic         seen_dot;
    int unsigned  nfrac;
    acc      = '0;
    seen_dot = 1'b0;
    nfrac    = 0;
    for (int unsigned i = 0; i < FIELD_LEN; i++) begin
      if (i < field.len) begin
        if (field.chars[i] >= 8'h30 && field.chars[i] <= 8'h39) begin
          if (!seen_dot || nfrac < FRAC) begin
            acc = acc * W'(10) + W'(field.chars[i] - 8'h30);
            if (seen_dot) nfrac = nfrac + 1;
          end
        end else if (field.chars[i] == CH_DOT && !seen_dot) begin
          seen_dot = 1'b1;
        end
      end
    end
    for (int unsigned k = 0; k < FRAC; k++) begin
      if (k >= nfrac) acc = acc * W'(10);
    end
    value = acc;
  end

endmodule
