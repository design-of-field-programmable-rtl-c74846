// validator: marks each GPS receiver valid when it reports at least MIN_SATS
// satellites in use.
//
// gps_valid[i] is 1 when sat[i] >= MIN_SATS (3 by default); the block is
// combinational. Bit i of gps_valid belongs to GPS i+1, matching the buffer
// table of the design (0001 means only GPS1 is used). The threshold of three
// satellites comes from the original design.
module validator
  import gps_pkg::*;
#(
  parameter int unsigned N        = NUM_GPS,
  parameter int unsigned MIN_SATS = MIN_SAT
) (
  input  logic [SAT_W-1:0] sat [N],    // satellite count per receiver
  output logic [N-1:0]     gps_valid
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      gps_valid[i] = sat[i] >= SAT_W'(MIN_SATS);
    end
  end

endmodule
