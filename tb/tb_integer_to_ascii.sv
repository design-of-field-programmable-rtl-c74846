// tb_integer_to_ascii: converts boundary and random values and compares the
// eleven ASCII characters with $sformatf("%011d"), and checks the latency of
// VAL_W + 1 cycles.
module tb_integer_to_ascii;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [VAL_W-1:0] value = 0;
  logic [DIGITS-1:0][7:0] ascii;
  logic busy, done_conv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  integer_to_ascii dut (.clk, .rst_n, .start, .value, .ascii, .busy, .done_conv);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic conv(longint v);
    string e;
    int lat;
    value <= VAL_W'(v);
    start <= 1;
    @(posedge clk);
    start <= 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done_conv);
    e = $sformatf("%011d", v);
    checks += 2;
    for (int i = 0; i < DIGITS; i++) begin
      if (ascii[i] != e[i]) begin failures++; $display("%0d digit %0d: %c vs %c", v, i, ascii[i], e[i]); break; end
    end
    if (lat != VAL_W + 2) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    conv(0); conv(9); conv(10); conv(75638287); conv(1123606419); conv(4692);
    conv((64'd1 << 34) - 1); conv(64'd9999999999);
    for (int n = 0; n < 300; n++) conv(longint'({$urandom, $urandom}) & ((64'd1 << 34) - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
