// uart_monitor: behavioural 8N1 decoder for checking a serial output.
//
// Not synthesizable. It waits for a falling edge, samples every bit in its
// middle and pushes each byte with a correct stop bit into the queue bytes;
// a byte with a low stop bit increments frame_errors. The cycle of each
// start edge is kept in starts for rate checks.
module uart_monitor #(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input logic clk,
  input logic rx
);

  logic [7:0]  bytes[$];
  longint      starts[$];
  int          frame_errors = 0;
  longint      cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge rx);
      starts.push_back(cycle);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        b[i] = rx;
      end
      repeat (CLKS_PER_BIT) @(posedge clk);
      if (rx) bytes.push_back(b);
      else    frame_errors++;
    end
  end

endmodule
