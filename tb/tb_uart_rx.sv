// tb_uart_rx: sends random bytes into uart_rx through the serial model and
// compares each received byte; also checks that a frame with a low stop bit
// is flagged and not delivered, and that a byte takes 9.5 bit times.
module tb_uart_rx;
  localparam int unsigned CPB = 16;
  logic clk = 0, rst_n = 0;
  logic rx;
  logic [7:0] rx_byte;
  logic rx_valid, frame_err;
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  int nerr = 0;
  longint cyc = 0, last_valid = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nmea_source #(.CLKS_PER_BIT(CPB)) src (.clk, .tx(rx));
  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .rx_byte, .rx_valid, .frame_err);

  always @(posedge clk) begin
    if (rst_n && rx_valid) begin got.push_back(rx_byte); last_valid = cyc; end
    if (rst_n && frame_err) nerr++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent[$];
    longint t0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (i == 0) b = 8'h24;
      if (i == 1) b = 8'hFF;
      if (i == 2) b = 8'h00;
      sent.push_back(b);
      if (i == 5) t0 = cyc;
      src.send_byte(b);
      if (i == 5) begin
        repeat (2) @(posedge clk);
        checks++;
        // 9.5 bit times plus synchroniser and register stages
        if (last_valid - t0 < longint'(CPB * 9) || last_valid - t0 > longint'(CPB * 10)) begin
          failures++; $display("latency %0d", last_valid - t0);
        end
      end
    end
    // frame with a low stop bit
    src.tx = 1'b0;
    repeat (CPB * 10) @(posedge clk);
    src.tx = 1'b1;
    repeat (CPB * 4) @(posedge clk);
    checks++;
    if (got.size() != sent.size()) begin
      failures++; $display("count %0d vs %0d", got.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; $display("byte %0d: %h vs %h", i, got[i], sent[i]); end
    end
    checks++;
    if (nerr != 1) begin failures++; $display("frame errors %0d", nerr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
