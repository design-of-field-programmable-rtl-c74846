// nmea_source: behavioural model of one GPS sensor's serial output.
//
// Not synthesizable. The task send_string() shifts out each character of a
// string as an 8N1 UART frame at CLKS_PER_BIT clock cycles per bit, with
// GAP_BITS idle bit times between characters. The line idles high.
module nmea_source #(
  parameter int unsigned CLKS_PER_BIT = 8,
  parameter int unsigned GAP_BITS     = 0
) (
  input  logic clk,
  output logic tx
);

  initial tx = 1'b1;

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      tx = frame[i];
      repeat (CLKS_PER_BIT) @(posedge clk);
    end
    repeat (GAP_BITS * CLKS_PER_BIT) @(posedge clk);
  endtask

  task automatic send_string(input string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
  endtask

endmodule
