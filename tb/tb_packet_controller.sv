// tb_packet_controller: gives packet_controller receiver fields and averaged
// digits, lets it send through uart_tx, decodes the line with a monitor and
// compares the text with the expected packet built in the testbench. Also
// checks busy/sent, the packet length, an empty field, and that each byte
// takes ten bit times plus the fixed hand-over gap.
module tb_packet_controller;
  import gps_pkg::*;
  localparam int unsigned CPB = 4;
  logic clk = 0, rst_n = 0, start = 0;
  gga_ascii_t gga [4];
  logic [DIGITS-1:0][7:0] avg_lat, avg_lon, avg_alt;
  logic [2:0] n_valid;
  logic tx_start, tx_busy, tx_done, tx, busy, sent;
  logic [7:0] tx_data;
  logic [8:0] pkt_len;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  packet_controller #(.N(4), .DEPTH(512)) dut (.clk, .rst_n, .start, .gga,
    .avg_lat, .avg_lon, .avg_alt, .n_valid, .tx_start, .tx_data, .tx_busy,
    .tx_done, .busy, .sent, .pkt_len);
  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst_n, .tx_start, .tx_data, .tx, .tx_busy, .tx_done);
  uart_monitor #(.CLKS_PER_BIT(CPB)) mon (.clk, .rx(tx));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ascii_field_t mk(string s);
    ascii_field_t f = '0;
    for (int i = 0; i < s.len(); i++) f.chars[i] = s[i];
    f.len = LEN_W'(s.len());
    return f;
  endfunction

  function automatic logic [DIGITS-1:0][7:0] mkd(longint v);
    string s = $sformatf("%011d", v);
    logic [DIGITS-1:0][7:0] d;
    for (int i = 0; i < DIGITS; i++) d[i] = s[i];
    return d;
  endfunction

  task automatic run(string lat[4], string lon[4], string alt[4], string sat[4],
                     longint alat, longint alon, longint aalt, int nv);
    string exp = "";
    string got = "";
    int b0;
    for (int g = 0; g < 4; g++) begin
      gga[g].lat = mk(lat[g]); gga[g].lon = mk(lon[g]);
      gga[g].alt = mk(alt[g]); gga[g].sat = mk(sat[g]);
      exp = {exp, $sformatf("G%0d,%s,%s,%s,%s\r\n", g + 1, lat[g], lon[g], alt[g], sat[g])};
    end
    avg_lat = mkd(alat); avg_lon = mkd(alon); avg_alt = mkd(aalt); n_valid = 3'(nv);
    exp = {exp, $sformatf("AV,%04d.%05d,%05d.%05d,%05d.%01d,%0d\r\n",
                          alat / 100000, alat % 100000, alon / 100000, alon % 100000,
                          aalt / 10, aalt % 10, nv)};
    b0 = mon.bytes.size();
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    checks++;
    if (!busy) failures++;
    while (!sent) @(posedge clk);
    repeat (CPB * 2) @(posedge clk);
    checks++;
    if (busy) failures++;
    for (int i = b0; i < mon.bytes.size(); i++) got = {got, string'(mon.bytes[i])};
    checks++;
    if (got != exp) begin failures++; $display("got:\n%s\nexpected:\n%s", got, exp); end
    checks++;
    if (int'(pkt_len) != exp.len()) begin failures++; $display("pkt_len %0d vs %0d", pkt_len, exp.len()); end
    // byte spacing: 10 bit times plus a four-cycle hand-over (tx_done, RAM
    // read, tx_start register, transmitter load)
    for (int i = b0 + 1; i < mon.starts.size(); i++) begin
      checks++;
      if (mon.starts[i] - mon.starts[i-1] != longint'(10 * CPB + 4)) begin
        failures++; $display("spacing %0d", mon.starts[i] - mon.starts[i-1]); break;
      end
    end
  endtask

  initial begin
    string lat[4] = '{"0756.89465", "0755.87746", "0756.88464", "0755.87475"};
    string lon[4] = '{"11238.31502", "11236.31419", "11231.31145", "11238.31611"};
    string alt[4] = '{"469.0", "465.0", "465.0", "478.0"};
    string sat[4] = '{"04", "04", "05", "04"};
    string lat2[4] = '{"0756.1", "", "123456789012", "0"};
    string sat2[4] = '{"02", "", "12", "00"};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(lat, lon, alt, sat, 75638287, 1123606419, 4692, 4);
    run(lat2, lon, alt, sat2, 12345, 64'd9999999999, 123456, 1);
    checks++;
    if (mon.frame_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
