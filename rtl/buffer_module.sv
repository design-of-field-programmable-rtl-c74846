// buffer_module: holds the converted latitude, longitude and altitude of
// every receiver and forwards only those of the valid receivers.
//
// On load the integer values of all receivers and the gps_valid mask are
// registered. The outputs are the registered values of receivers whose
// gps_valid bit is 1 and zero for the others, following the buffer table of
// the design: for gps_valid = 0101 the values of GPS1 and GPS3 are passed and
// those of GPS2 and GPS4 are replaced by 0. valid_o is the registered mask.
//
// Timing: outputs change on the clock edge after load. The masking rule is
// from the original design; registering on load is this design's choice.
module buffer_module
  import gps_pkg::*;
#(
  parameter int unsigned N = NUM_GPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  position_t    pos_in  [N],
  input  logic [N-1:0] gps_valid,
  output position_t    pos_out [N],  // zero where the receiver is invalid
  output logic [N-1:0] valid_o
);

  position_t held [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) held[i] <= '0;
      valid_o <= '0;
    end else if (load) begin
      for (int i = 0; i < N; i++) held[i] <= pos_in[i];
      valid_o <= gps_valid;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) pos_out[i] = valid_o[i] ? held[i] : '0;
  end

endmodule
