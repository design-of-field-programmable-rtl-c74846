// uart_tx: sends bytes to the PC as 8N1 serial frames.
//
// A one-cycle tx_start with a byte on tx_data starts a frame while tx_busy is
// low: one low start bit, eight data bits least significant first, one high
// stop bit, each CLKS_PER_BIT cycles long. tx_busy stays high for the whole
// frame and tx_done pulses for one cycle at its end. A start request while
// busy is ignored. The line idles high.
//
// Timing: one byte takes 10 * CLKS_PER_BIT cycles, 1.04 ms at 9600 bps. The
// 8-bit transfers and the 9600 bps rate follow the original design; the framing
// and the handshake are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = gps_pkg::BIT_CYCLES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_start,   // one-cycle request, honoured when !tx_busy
  input  logic [7:0] tx_data,
  output logic       tx,         // serial line to the PC
  output logic       tx_busy,
  output logic       tx_done     // one-cycle pulse after the stop bit
);

  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  logic [CNT_W-1:0] cnt;
  logic [3:0]       bit_idx;     // 0 start, 1..8 data, 9 stop
  logic [9:0]       frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx      <= 1'b1;
      tx_busy <= 1'b0;
      tx_done <= 1'b0;
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
    end else begin
      tx_done <= 1'b0;
      if (!tx_busy) begin
        tx <= 1'b1;
        if (tx_start) begin
          frame   <= {1'b1, tx_data, 1'b0};
          tx      <= 1'b0;
          tx_busy <= 1'b1;
          cnt     <= '0;
          bit_idx <= '0;
        end
      end else if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          tx_busy <= 1'b0;
          tx_done <= 1'b1;
          tx      <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          tx      <= frame[bit_idx + 4'd1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
