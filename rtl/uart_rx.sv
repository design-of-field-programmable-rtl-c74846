// uart_rx: receives 8N1 serial bytes from one GPS sensor.
//
// The line idles high. A falling edge starts a frame; the receiver waits half
// a bit time, checks that the line is still low (a start bit, not a glitch),
// then samples the eight data bits, least significant first, in the middle of
// each bit, and finally samples the stop bit. A byte is delivered with a
// one-cycle rx_valid pulse only when the stop bit is high; a frame with a low
// stop bit raises a one-cycle frame_err pulse instead. The input is passed
// through a two-flip-flop synchroniser first.
//
// Timing: rx_valid rises about 9.5 bit times after the start edge. At the
// default 50 MHz clock and 9600 bps one bit lasts CLKS_PER_BIT = 5208 cycles.
// The original design says only that the GPS data arrives over UART and that the
// link runs at 9600 bps; the 8N1 framing, the mid-bit sampling and the
// clock rate are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = gps_pkg::BIT_CYCLES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,          // serial line from the GPS sensor
  output logic [7:0] rx_byte,     // last received byte
  output logic       rx_valid,    // one-cycle pulse: rx_byte is new
  output logic       frame_err    // one-cycle pulse: stop bit was low
);

  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_t;

  rx_state_t        state;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;
  logic [1:0]       sync;
  logic             rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= RX_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      rx_byte   <= '0;
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          cnt <= '0;
          if (!rx_s) state <= RX_START;
        end
        RX_START: begin
          if (cnt == CNT_W'(CLKS_PER_BIT / 2 - 1)) begin
            cnt <= '0;
            if (!rx_s) begin
              bit_idx <= '0;
              state   <= RX_DATA;
            end else begin
              state <= RX_IDLE;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RX_DATA: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RX_STOP: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= RX_IDLE;
            if (rx_s) begin
              rx_byte  <= shreg;
              rx_valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
