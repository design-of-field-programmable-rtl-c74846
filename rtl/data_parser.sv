// data_parser: the receiving side of the system, one parser channel per GPS.
//
// Each of the NUM_GPS serial inputs feeds its own uart_rx and gpgga_parser,
// so all receivers are read at the same time and independently. For each
// channel the block presents the fields of the last $GPGGA sentence and a
// one-cycle done pulse when they change. There is no shared logic between
// channels. Timing: a channel's done follows the end of its sentence's line
// feed by about half a bit time plus three cycles. The channel structure
// follows the original design, as does the count of four.
module data_parser
  import gps_pkg::*;
#(
  parameter int unsigned N            = NUM_GPS,
  parameter int unsigned CLKS_PER_BIT = gps_pkg::BIT_CYCLES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] rx,          // serial lines from the GPS sensors
  output gga_ascii_t   gga  [N],    // parsed fields per channel
  output logic [N-1:0] done,        // per-channel sentence-complete pulse
  output logic [N-1:0] frame_err    // per-channel UART framing error pulse
);

  for (genvar i = 0; i < N; i++) begin : g_ch
    logic [7:0] rx_byte;
    logic       rx_valid;
    logic [2:0] pstate;

    uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
      .clk, .rst_n, .rx(rx[i]),
      .rx_byte, .rx_valid, .frame_err(frame_err[i])
    );

    gpgga_parser u_parse (
      .clk, .rst_n, .rx_byte, .rx_valid,
      .gga(gga[i]), .done(done[i]), .state_o(pstate)
    );
  end

endmodule
