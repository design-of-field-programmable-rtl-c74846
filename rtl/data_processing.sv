// data_processing: turns the fields of the four receivers into one averaged
// position, ready for transmission.
//
// The chain is buffer_ascii -> ascii_to_integer -> validator and
// buffer_module -> average -> integer_to_ascii, run by a small sequencer:
//   WAIT   until every receiver has delivered a new sentence (all_fresh) and
//          the transmitter side is ready (out_ready);
//   EJECT  pulse eject_data, so buffer_ascii releases the set it holds;
//   LOAD   the released ASCII fields are converted (combinationally) and
//          buffer_module registers them with the validator's gps_valid mask;
//   AVG    the three average units (lat, lon, alt) run in parallel over the
//          masked values;
//   CONV   the three integer_to_ascii units run in parallel;
//   then done_conv pulses and the results stay stable until the next round.
// Receivers with fewer than three satellites contribute 0 and are left out of
// the divisor.
//
// Timing: from eject_data to done_conv takes SUM_W + VAL_W + 8 cycles, where
// SUM_W = VAL_W + 3 is the width of the sum of four values: 79 cycles at the
// defaults. The sentences themselves arrive about once per second.
// The entities and their order follow the original design; the sequencer,
// the all-receivers-fresh release rule and the fixed-point scaling are this
// design's choices.
module data_processing
  import gps_pkg::*;
#(
  parameter int unsigned N = NUM_GPS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  gga_ascii_t             gga_in   [N],   // from the data parser
  input  logic [N-1:0]           done_in,
  input  logic                   out_ready,      // packet side can accept
  output gga_ascii_t             gga_out  [N],   // the released ASCII set
  output position_t              avg_pos,        // averaged integers
  output logic [DIGITS-1:0][7:0] avg_lat_ascii,
  output logic [DIGITS-1:0][7:0] avg_lon_ascii,
  output logic [DIGITS-1:0][7:0] avg_alt_ascii,
  output logic [N-1:0]           gps_valid,      // mask used for the average
  output logic [2:0]             n_valid,
  output logic                   eject_data,
  output logic                   done_conv
);

  typedef enum logic [2:0] {S_WAIT, S_EJECT, S_LOAD, S_AVG, S_AVG_WAIT,
                            S_CONV, S_CONV_WAIT} dp_state_t;

  dp_state_t state;

  // buffer_ASCII
  logic [N-1:0] fresh, out_fresh;
  logic         all_fresh;

  buffer_ascii #(.N(N)) u_buf_ascii (
    .clk, .rst_n, .gga_in, .done_in, .eject_data,
    .data_out(gga_out), .out_fresh, .fresh, .all_fresh
  );

  // ASCII_to_integer, one converter per field and receiver
  position_t        pos_int [N];
  logic [SAT_W-1:0] sat_int [N];
  logic [N-1:0]     valid_c;

  for (genvar i = 0; i < N; i++) begin : g_conv
    ascii_to_integer #(.FRAC(LAT_FRAC)) u_lat (.field(gga_out[i].lat), .value(pos_int[i].lat));
    ascii_to_integer #(.FRAC(LON_FRAC)) u_lon (.field(gga_out[i].lon), .value(pos_int[i].lon));
    ascii_to_integer #(.FRAC(ALT_FRAC)) u_alt (.field(gga_out[i].alt), .value(pos_int[i].alt));
    ascii_to_integer #(.FRAC(0), .W(SAT_W)) u_sat (.field(gga_out[i].sat), .value(sat_int[i]));
  end

  // validator
  validator #(.N(N)) u_valid (.sat(sat_int), .gps_valid(valid_c));

  // buffer_module
  position_t pos_masked [N];
  logic      load;

  buffer_module #(.N(N)) u_buf_mod (
    .clk, .rst_n, .load, .pos_in(pos_int), .gps_valid(valid_c),
    .pos_out(pos_masked), .valid_o(gps_valid)
  );

  // average, one unit per quantity
  logic [VAL_W-1:0] lat_v [N], lon_v [N], alt_v [N];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      lat_v[i] = pos_masked[i].lat;
      lon_v[i] = pos_masked[i].lon;
      alt_v[i] = pos_masked[i].alt;
    end
  end

  logic avg_start;
  logic avg_done_lat, avg_done_lon, avg_done_alt;
  logic avg_busy_lat, avg_busy_lon, avg_busy_alt;

  average #(.N(N)) u_avg_lat (.clk, .rst_n, .start(avg_start), .vals(lat_v),
    .gps_valid, .avg(avg_pos.lat), .busy(avg_busy_lat), .done(avg_done_lat));
  average #(.N(N)) u_avg_lon (.clk, .rst_n, .start(avg_start), .vals(lon_v),
    .gps_valid, .avg(avg_pos.lon), .busy(avg_busy_lon), .done(avg_done_lon));
  average #(.N(N)) u_avg_alt (.clk, .rst_n, .start(avg_start), .vals(alt_v),
    .gps_valid, .avg(avg_pos.alt), .busy(avg_busy_alt), .done(avg_done_alt));

  // integer_to_ASCII, one unit per quantity
  logic conv_start;
  logic conv_done_lat, conv_done_lon, conv_done_alt;
  logic conv_busy_lat, conv_busy_lon, conv_busy_alt;

  integer_to_ascii u_i2a_lat (.clk, .rst_n, .start(conv_start), .value(avg_pos.lat),
    .ascii(avg_lat_ascii), .busy(conv_busy_lat), .done_conv(conv_done_lat));
  integer_to_ascii u_i2a_lon (.clk, .rst_n, .start(conv_start), .value(avg_pos.lon),
    .ascii(avg_lon_ascii), .busy(conv_busy_lon), .done_conv(conv_done_lon));
  integer_to_ascii u_i2a_alt (.clk, .rst_n, .start(conv_start), .value(avg_pos.alt),
    .ascii(avg_alt_ascii), .busy(conv_busy_alt), .done_conv(conv_done_alt));

  always_comb begin
    n_valid = '0;
    for (int i = 0; i < N; i++) n_valid = n_valid + 3'(gps_valid[i]);
  end

  assign eject_data = (state == S_EJECT);
  assign load       = (state == S_LOAD);
  assign avg_start  = (state == S_AVG);
  assign conv_start = (state == S_CONV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_WAIT;
      done_conv <= 1'b0;
    end else begin
      done_conv <= 1'b0;
      unique case (state)
        S_WAIT:      if (all_fresh && out_ready) state <= S_EJECT;
        S_EJECT:     state <= S_LOAD;
        S_LOAD:      state <= S_AVG;
        S_AVG:       state <= S_AVG_WAIT;
        S_AVG_WAIT:  if (avg_done_lat && avg_done_lon && avg_done_alt) state <= S_CONV;
        S_CONV:      state <= S_CONV_WAIT;
        S_CONV_WAIT: if (conv_done_lat && conv_done_lon && conv_done_alt) begin
                       state     <= S_WAIT;
                       done_conv <= 1'b1;
                     end
        default:     state <= S_WAIT;
      endcase
    end
  end

  // The three units of a stage start together and have equal latency.
  a_avg_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    avg_busy_lat == avg_busy_lon && avg_busy_lon == avg_busy_alt);
  a_conv_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    conv_busy_lat == conv_busy_lon && conv_busy_lon == conv_busy_alt);

endmodule
