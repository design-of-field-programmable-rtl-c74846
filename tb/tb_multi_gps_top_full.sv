// tb_multi_gps_top_full: one complete round of the system with every
// parameter at its default (50 MHz clock, 9600 bps on all five serial
// lines). The four receivers send the published test sentences, preceded by
// other NMEA sentences, at the same time; the packet on the PC line is
// decoded and compared with the expected text, and the PC line rate is
// checked to be 9600 bps (5208 cycles per bit).
module tb_multi_gps_top_full;
  import gps_pkg::*;
  import tb_gps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] gps_rx;
  logic pc_tx;
  position_t avg_pos;
  logic [3:0] gps_valid, sentence_done, rx_frame_err;
  logic done_conv, packet_sent;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;   // 50 MHz

  nmea_source #(.CLKS_PER_BIT(BIT_CYCLES)) s0 (.clk, .tx(gps_rx[0]));
  nmea_source #(.CLKS_PER_BIT(BIT_CYCLES)) s1 (.clk, .tx(gps_rx[1]));
  nmea_source #(.CLKS_PER_BIT(BIT_CYCLES)) s2 (.clk, .tx(gps_rx[2]));
  nmea_source #(.CLKS_PER_BIT(BIT_CYCLES)) s3 (.clk, .tx(gps_rx[3]));
  uart_monitor #(.CLKS_PER_BIT(BIT_CYCLES)) mon (.clk, .rx(pc_tx));

  multi_gps_top dut (.clk, .rst_n, .gps_rx, .pc_tx, .avg_pos, .gps_valid,
    .sentence_done, .rx_frame_err, .done_conv, .packet_sent);

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string lat[4] = '{"0756.89465", "0755.87746", "0756.88464", "0755.87475"};
    string lon[4] = '{"11238.31502", "11236.31419", "11231.31145", "11238.31611"};
    string alt[4] = '{"469.0", "465.0", "465.0", "478.0"};
    string sat[4] = '{"04", "04", "05", "04"};
    string gsv = "$GPGSV,3,1,11,03,03,111,00,04,15,270,00,06,01,010,00*4A\r\n";
    string exp = "";
    string got = "";
    for (int g = 0; g < 4; g++)
      exp = {exp, $sformatf("G%0d,%s,%s,%s,%s\r\n", g + 1, lat[g], lon[g], alt[g], sat[g])};
    exp = {exp, "AV,0756.38287,11236.06419,00469.2,4\r\n"};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    fork
      s0.send_string({gsv, gga_sentence(lat[0], lon[0], alt[0], sat[0])});
      s1.send_string(gga_sentence(lat[1], lon[1], alt[1], sat[1]));
      s2.send_string({gsv, gga_sentence(lat[2], lon[2], alt[2], sat[2])});
      s3.send_string(gga_sentence(lat[3], lon[3], alt[3], sat[3]));
    join
    while (!packet_sent) @(posedge clk);
    repeat (BIT_CYCLES * 2) @(posedge clk);
    foreach (mon.bytes[i]) got = {got, string'(mon.bytes[i])};
    checks++;
    if (got != exp) begin failures++; $display("got:\n%s\nexpected:\n%s", got, exp); end
    checks++;
    if (avg_pos.lat != 34'd75638287 || avg_pos.lon != 34'd1123606419 || avg_pos.alt != 34'd4692) failures++;
    checks++;
    if (gps_valid != 4'b1111) failures++;
    // byte period: 10 bits of 5208 cycles plus a four-cycle hand-over
    for (int i = 1; i < mon.starts.size(); i++) begin
      checks++;
      if (mon.starts[i] - mon.starts[i-1] != longint'(10 * 5208 + 4)) begin
        failures++; $display("byte period %0d", mon.starts[i] - mon.starts[i-1]); break;
      end
    end
    $display("packet of %0d bytes", got.len());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
