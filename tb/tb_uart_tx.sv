// tb_uart_tx: sends random bytes through uart_tx and decodes the line with
// an independent monitor; checks every byte, the frame length of
// 10 bit times, tx_busy, and that a start while busy is ignored.
module tb_uart_tx;
  localparam int unsigned CPB = 12;
  logic clk = 0, rst_n = 0;
  logic tx_start = 0;
  logic [7:0] tx_data = 0;
  logic tx, tx_busy, tx_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .tx_start, .tx_data, .tx, .tx_busy, .tx_done);
  uart_monitor #(.CLKS_PER_BIT(CPB)) mon (.clk, .rx(tx));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent[$];
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    checks++;
    if (tx !== 1'b1) failures++;
    for (int i = 0; i < 30; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      sent.push_back(b);
      tx_data  <= b;
      tx_start <= 1;
      @(posedge clk);
      tx_start <= 0;
      n = 0;
      // a second request during the frame must be ignored
      tx_data <= 8'hAA;
      tx_start <= 1;
      @(posedge clk);
      tx_start <= 0;
      n = 1;
      while (!tx_done) begin
        @(posedge clk);
        n++;
        if (!tx_busy && !tx_done) begin failures++; checks++; end
      end
      checks++;
      if (n != 10 * CPB + 1) begin failures++; $display("frame length %0d", n); end
      @(posedge clk);
    end
    repeat (CPB * 3) @(posedge clk);
    checks++;
    if (mon.bytes.size() != sent.size()) begin
      failures++; $display("bytes %0d vs %0d", mon.bytes.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < mon.bytes.size(); i++) begin
      checks++;
      if (mon.bytes[i] != sent[i]) begin failures++; $display("byte %0d %h %h", i, mon.bytes[i], sent[i]); end
    end
    checks++;
    if (mon.frame_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
