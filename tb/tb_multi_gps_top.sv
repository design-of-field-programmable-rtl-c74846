// tb_multi_gps_top: end-to-end test of the whole system at a short bit time.
//
// Four serial GPS models send NMEA traffic (other sentences mixed with
// $GPGGA) to multi_gps_top; a monitor decodes the PC line. For every round
// the expected packet text is built here from the sentence strings and
// compared byte for byte. Rounds: the published test data; one receiver
// below three satellites (average over three); no valid receiver; sentences
// that arrive while a packet is being sent (held for the next round); and
// random data. Each mechanism is counted and must occur at least once.
module tb_multi_gps_top;
  import gps_pkg::*;
  import tb_gps_pkg::*;
  localparam int unsigned CPB = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0] gps_rx;
  logic pc_tx;
  position_t avg_pos;
  logic [3:0] gps_valid, sentence_done, rx_frame_err;
  logic done_conv, packet_sent;
  int checks = 0, failures = 0;
  int n_sent = 0;
  // mechanism counters
  int m_skipped = 0, m_masked = 0, m_none_valid = 0, m_div3 = 0;
  int m_arrive_busy = 0, m_wait_missing = 0;
  always #5 clk = ~clk;

  nmea_source #(.CLKS_PER_BIT(CPB), .GAP_BITS(0)) s0 (.clk, .tx(gps_rx[0]));
  nmea_source #(.CLKS_PER_BIT(CPB), .GAP_BITS(1)) s1 (.clk, .tx(gps_rx[1]));
  nmea_source #(.CLKS_PER_BIT(CPB), .GAP_BITS(2)) s2 (.clk, .tx(gps_rx[2]));
  nmea_source #(.CLKS_PER_BIT(CPB), .GAP_BITS(0)) s3 (.clk, .tx(gps_rx[3]));
  uart_monitor #(.CLKS_PER_BIT(CPB)) mon (.clk, .rx(pc_tx));

  multi_gps_top #(.N(4), .CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .gps_rx, .pc_tx,
    .avg_pos, .gps_valid, .sentence_done, .rx_frame_err, .done_conv, .packet_sent);

  // a partly matched header that the parser abandoned (another sentence type)
  logic [2:0] ps_q [4];
  logic [2:0] ps [4];
  assign ps[0] = dut.u_parser.g_ch[0].pstate;
  assign ps[1] = dut.u_parser.g_ch[1].pstate;
  assign ps[2] = dut.u_parser.g_ch[2].pstate;
  assign ps[3] = dut.u_parser.g_ch[3].pstate;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (ps_q[i] >= 3'd3 && ps_q[i] <= 3'd6 && ps[i] == 3'd0) m_skipped++;
      ps_q[i] <= ps[i];
    end
    if (packet_sent) n_sent++;
    if (|sentence_done && dut.pkt_busy) m_arrive_busy++;
    if (|dut.u_proc.fresh && !dut.u_proc.all_fresh && !dut.pkt_busy && dut.u_proc.state == 0) m_wait_missing++;
    if (|rx_frame_err) begin failures++; $display("frame error"); end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string other[3] = '{"$GPGSV,3,1,11,03,03,111,00,04,15,270,00,06,01,010,00*4A\r\n",
                      "$GPRMC,041523.00,A,0756.8,S,11238.3,E,0.0,0.0,010322,,,A*6E\r\n",
                      "$GPGSA,A,3,04,05,,09,12,,,24,,,,,2.5,1.3,2.1*39\r\n"};

  task automatic send_all(string lat[4], string lon[4], string alt[4], string sat[4],
                          bit with_other);
    fork
      s0.send_string({with_other ? other[0] : "", gga_sentence(lat[0], lon[0], alt[0], sat[0])});
      s1.send_string({gga_sentence(lat[1], lon[1], alt[1], sat[1])});
      s2.send_string({with_other ? other[1] : "", with_other ? other[2] : "", gga_sentence(lat[2], lon[2], alt[2], sat[2])});
      s3.send_string({with_other ? other[2] : "", gga_sentence(lat[3], lon[3], alt[3], sat[3])});
    join
  endtask

  function automatic string expect_pkt(string lat[4], string lon[4], string alt[4], string sat[4]);
    string e = "";
    longint sl = 0, so = 0, sa = 0, el, eo, ea;
    int c = 0;
    for (int g = 0; g < 4; g++) begin
      e = {e, $sformatf("G%0d,%s,%s,%s,%s\r\n", g + 1, lat[g], lon[g], alt[g], sat[g])};
      if (fixval(sat[g], 0) >= 3) begin
        c++; sl += fixval(lat[g], 5); so += fixval(lon[g], 5); sa += fixval(alt[g], 1);
      end
    end
    el = c ? sl / c : 0; eo = c ? so / c : 0; ea = c ? sa / c : 0;
    return {e, $sformatf("AV,%04d.%05d,%05d.%05d,%05d.%01d,%0d\r\n",
                         el / 100000, el % 100000, eo / 100000, eo % 100000,
                         (ea / 10) % 100000, ea % 10, c)};
  endfunction

  task automatic check_pkt(int idx, string exp);
    string got = "";
    int b0 = 0;
    // packets end with "\r\n" after the AV line; find packet idx by counting AV lines
    int start_i = 0, k = 0;
    for (int i = 0; i + 1 < mon.bytes.size(); i++) begin
      if (k == idx) begin start_i = i; break; end
      if (mon.bytes[i] == "A" && mon.bytes[i+1] == "V") begin
        while (i < mon.bytes.size() && mon.bytes[i] != 8'h0A) i++;
        k++;
        start_i = i + 1;
      end
    end
    for (int i = start_i; i < mon.bytes.size() && got.len() < exp.len(); i++) got = {got, string'(mon.bytes[i])};
    checks++;
    if (got != exp) begin failures++; $display("packet %0d\ngot:\n%s\nexpected:\n%s", idx, got, exp); end
  endtask

  task automatic wait_sent(int n);
    while (n_sent < n) @(posedge clk);
    repeat (CPB * 12) @(posedge clk);
  endtask

  initial begin
    string lat[4] = '{"0756.89465", "0755.87746", "0756.88464", "0755.87475"};
    string lon[4] = '{"11238.31502", "11236.31419", "11231.31145", "11238.31611"};
    string alt[4] = '{"469.0", "465.0", "465.0", "478.0"};
    string sat[4] = '{"04", "04", "05", "04"};
    string sat_b[4] = '{"04", "02", "05", "04"};
    string sat_0[4] = '{"00", "02", "01", "00"};
    string exps[$];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);

    // 1: the published test data
    send_all(lat, lon, alt, sat, 1);
    exps.push_back(expect_pkt(lat, lon, alt, sat));
    wait_sent(1);
    checks++;
    if (avg_pos.lat != 34'd75638287 || avg_pos.lon != 34'd1123606419 || avg_pos.alt != 34'd4692) begin
      failures++; $display("avg %0d %0d %0d", avg_pos.lat, avg_pos.lon, avg_pos.alt);
    end
    // 2: GPS2 below three satellites
    send_all(lat, lon, alt, sat_b, 0);
    exps.push_back(expect_pkt(lat, lon, alt, sat_b));
    wait_sent(2);
    checks++;
    if (gps_valid != 4'b1101) failures++;
    if (gps_valid != 4'b1111) m_masked++;
    if ($countones(gps_valid) == 3) m_div3++;
    // 3: no valid receiver; 4: sent while packet 3 is going out
    send_all(lat, lon, alt, sat_0, 1);
    exps.push_back(expect_pkt(lat, lon, alt, sat_0));
    while (!done_conv) @(posedge clk);
    checks++;
    if (gps_valid == 4'b0000) m_none_valid++;
    else failures++;
    begin
      string lat4[4] = '{"0756.00001", "0756.00002", "0756.00003", "0756.00007"};
      send_all(lat4, lon, alt, sat, 0);
      exps.push_back(expect_pkt(lat4, lon, alt, sat));
    end
    wait_sent(4);
    // 5..7: random data, receivers finishing at different times
    for (int r = 0; r < 3; r++) begin
      string l[4], o[4], a[4], s[4];
      for (int i = 0; i < 4; i++) begin
        l[i] = $sformatf("%04d.%05d", $urandom_range(0, 9000), $urandom_range(0, 99999));
        o[i] = $sformatf("%05d.%05d", $urandom_range(0, 18000), $urandom_range(0, 99999));
        a[i] = $sformatf("%0d.%0d", $urandom_range(0, 9000), $urandom_range(0, 9));
        s[i] = $sformatf("%02d", $urandom_range(1, 12));
      end
      send_all(l, o, a, s, r == 1);
      exps.push_back(expect_pkt(l, o, a, s));
      wait_sent(5 + r);
    end
    foreach (exps[i]) check_pkt(i, exps[i]);
    checks++;
    if (n_sent != exps.size()) begin failures++; $display("packets %0d", n_sent); end
    checks++;
    if (mon.frame_errors != 0) failures++;
    $display("mechanisms: skipped=%0d masked=%0d div3=%0d none_valid=%0d arrive_busy=%0d wait_missing=%0d",
             m_skipped, m_masked, m_div3, m_none_valid, m_arrive_busy, m_wait_missing);
    checks += 6;
    if (m_skipped == 0) failures++;
    if (m_masked == 0) failures++;
    if (m_div3 == 0) failures++;
    if (m_none_valid == 0) failures++;
    if (m_arrive_busy == 0) failures++;
    if (m_wait_missing == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
