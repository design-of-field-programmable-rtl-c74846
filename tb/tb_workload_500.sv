// tb_workload_500: the two field tests of a stationary receiver set, 500
// samples each: four GPS receivers on the default four-channel system, and a
// single GPS receiver on a one-channel build (N = 1). Each sample is a
// $GPGGA sentence per receiver with a small random position error around a
// fixed point; every averaged result is checked against a model, and every
// packet must be sent before the next sample's sentences end. The root mean
// square error of receiver 1 alone and of the average is printed for
// information. A short bit time keeps the run fast.
module tb_workload_500;
  import gps_pkg::*;
  import tb_gps_pkg::*;
  localparam int unsigned CPB = 4;
  localparam int SAMPLES = 500;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // four-receiver system
  logic [3:0] rx4;
  logic tx4, dc4, sent4;
  position_t avg4;
  logic [3:0] v4, sd4, fe4;
  nmea_source #(.CLKS_PER_BIT(CPB)) g0 (.clk, .tx(rx4[0]));
  nmea_source #(.CLKS_PER_BIT(CPB)) g1 (.clk, .tx(rx4[1]));
  nmea_source #(.CLKS_PER_BIT(CPB)) g2 (.clk, .tx(rx4[2]));
  nmea_source #(.CLKS_PER_BIT(CPB)) g3 (.clk, .tx(rx4[3]));
  multi_gps_top #(.N(4), .CLKS_PER_BIT(CPB)) dut4 (.clk, .rst_n, .gps_rx(rx4), .pc_tx(tx4),
    .avg_pos(avg4), .gps_valid(v4), .sentence_done(sd4), .rx_frame_err(fe4),
    .done_conv(dc4), .packet_sent(sent4));

  // one-receiver system
  logic [0:0] rx1;
  logic tx1, dc1, sent1;
  position_t avg1;
  logic [0:0] v1, sd1, fe1;
  nmea_source #(.CLKS_PER_BIT(CPB)) h0 (.clk, .tx(rx1[0]));
  multi_gps_top #(.N(1), .CLKS_PER_BIT(CPB)) dut1 (.clk, .rst_n, .gps_rx(rx1), .pc_tx(tx1),
    .avg_pos(avg1), .gps_valid(v1), .sentence_done(sd1), .rx_frame_err(fe1),
    .done_conv(dc1), .packet_sent(sent1));

  int n_sent4 = 0, n_sent1 = 0;
  always @(posedge clk) if (rst_n) begin
    if (sent4) n_sent4++;
    if (sent1) n_sent1++;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // true position, in the fixed-point units of the design
  localparam longint LAT0 = 75638287, LON0 = 1123606419, ALT0 = 4692;

  function automatic longint jitter(int span);
    return longint'($urandom_range(0, 2 * span)) - span;
  endfunction

  initial begin
    real se1 = 0, se4 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < SAMPLES; n++) begin
      longint la[4], lo[4], al[4];
      longint el, eo, ea;
      string s[4];
      int d4, d1;
      el = 0; eo = 0; ea = 0;
      for (int i = 0; i < 4; i++) begin
        la[i] = LAT0 + jitter(300); lo[i] = LON0 + jitter(300); al[i] = ALT0 + jitter(60);
        s[i] = gga_sentence($sformatf("%04d.%05d", la[i] / 100000, la[i] % 100000),
                            $sformatf("%05d.%05d", lo[i] / 100000, lo[i] % 100000),
                            $sformatf("%0d.%0d", al[i] / 10, al[i] % 10), "07");
        el += la[i]; eo += lo[i]; ea += al[i];
      end
      el /= 4; eo /= 4; ea /= 4;
      d4 = n_sent4; d1 = n_sent1;
      fork
        g0.send_string(s[0]); g1.send_string(s[1]);
        g2.send_string(s[2]); g3.send_string(s[3]);
        h0.send_string(s[0]);
      join
      while (n_sent4 == d4 || n_sent1 == d1) @(posedge clk);
      checks += 2;
      if (avg4.lat != VAL_W'(el) || avg4.lon != VAL_W'(eo) || avg4.alt != VAL_W'(ea)) begin
        failures++; $display("sample %0d: 4-GPS average wrong %0d %0d %0d vs %0d %0d %0d", n, avg4.lat, avg4.lon, avg4.alt, el, eo, ea);
      end
      if (avg1.lat != VAL_W'(la[0]) || avg1.lon != VAL_W'(lo[0]) || avg1.alt != VAL_W'(al[0])) begin
        failures++; $display("sample %0d: 1-GPS result wrong", n);
      end
      se1 += real'((la[0] - LAT0) * (la[0] - LAT0));
      se4 += real'((avg4.lat - LAT0) * (avg4.lat - LAT0));
    end
    checks += 2;
    if (n_sent4 != SAMPLES || n_sent1 != SAMPLES) begin failures++; $display("packets %0d %0d", n_sent4, n_sent1); end
    if (|fe4 || |fe1) failures++;
    $display("latitude RMSE in 1e-5 minute: one receiver %.1f, average of four %.1f",
             $sqrt(se1 / SAMPLES), $sqrt(se4 / SAMPLES));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
