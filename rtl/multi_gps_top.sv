// multi_gps_top: FPGA data processing system for four GPS receivers.
//
// Four GPS sensors send NMEA text over their own UART lines. The data parser
// reads all four at once and extracts latitude, longitude, altitude and the
// satellite count from each $GPGGA sentence. Once every receiver has
// delivered a new sentence, data processing releases the set, converts it to
// integers, drops receivers with fewer than three satellites, averages the
// rest and converts the averages back to ASCII. The packet controller then
// merges the raw receiver data and the average into one text packet in RAM
// and sends it to a PC through the UART transmitter at 9600 bps. New
// sentences received while a packet is being sent are held for the next
// round.
//
// Ports: gps_rx[i] is the serial input of GPS i+1, pc_tx the serial output;
// the remaining outputs expose the state of a round for observation. Timing:
// a round starts at most once per set of sentences (one per second from
// typical receivers); a packet of about 190 to 260 bytes takes 0.2 to 0.27 s
// at 9600 bps. The block structure follows the original design; CLKS_PER_BIT
// assumes a 50 MHz clock.
module multi_gps_top
  import gps_pkg::*;
#(
  parameter int unsigned N            = NUM_GPS,
  parameter int unsigned CLKS_PER_BIT = gps_pkg::BIT_CYCLES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] gps_rx,       // serial lines from the GPS sensors
  output logic         pc_tx,        // serial line to the PC
  output position_t    avg_pos,      // last averaged position (integers)
  output logic [N-1:0] gps_valid,    // receivers used in the last average
  output logic [N-1:0] sentence_done,// per-receiver $GPGGA parsed pulse
  output logic [N-1:0] rx_frame_err, // per-receiver UART framing error
  output logic         done_conv,    // averages converted, packet starts
  output logic         packet_sent   // last byte of the packet sent
);

  gga_ascii_t gga_parsed [N];
  gga_ascii_t gga_round  [N];

  data_parser #(.N(N), .CLKS_PER_BIT(CLKS_PER_BIT)) u_parser (
    .clk, .rst_n, .rx(gps_rx), .gga(gga_parsed), .done(sentence_done),
    .frame_err(rx_frame_err)
  );

  logic [DIGITS-1:0][7:0] avg_lat_ascii, avg_lon_ascii, avg_alt_ascii;
  logic [2:0]             n_valid;
  logic                   pkt_busy;
  logic                   eject_data;

  data_processing #(.N(N)) u_proc (
    .clk, .rst_n, .gga_in(gga_parsed), .done_in(sentence_done),
    .out_ready(!pkt_busy), .gga_out(gga_round), .avg_pos,
    .avg_lat_ascii, .avg_lon_ascii, .avg_alt_ascii,
    .gps_valid, .n_valid, .eject_data, .done_conv
  );

  logic       tx_start, tx_busy, tx_done;
  logic [7:0] tx_data;
  logic [8:0] pkt_len;

  packet_controller #(.N(N), .DEPTH(512)) u_pkt (
    .clk, .rst_n, .start(done_conv), .gga(gga_round),
    .avg_lat(avg_lat_ascii), .avg_lon(avg_lon_ascii), .avg_alt(avg_alt_ascii),
    .n_valid, .tx_start, .tx_data, .tx_busy, .tx_done,
    .busy(pkt_busy), .sent(packet_sent), .pkt_len
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .tx_start, .tx_data, .tx(pc_tx), .tx_busy, .tx_done
  );

endmodule
