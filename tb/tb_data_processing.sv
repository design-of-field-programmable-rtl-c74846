// tb_data_processing: delivers sets of four parsed sentences to
// data_processing in random order and checks the averaged integers, their
// ASCII digits, gps_valid and n_valid against a model; covers the
// published test data, receivers below three satellites (zeroed and left
// out of the divisor), no valid receiver, holding while out_ready is low or
// a receiver is missing, and the latency from eject_data to done_conv.
module tb_data_processing;
  import gps_pkg::*;
  import tb_gps_pkg::*;
  logic clk = 0, rst_n = 0;
  gga_ascii_t gga_in [4], gga_out [4];
  logic [3:0] done_in = 0;
  logic out_ready = 1;
  position_t avg_pos;
  logic [DIGITS-1:0][7:0] a_lat, a_lon, a_alt;
  logic [3:0] gps_valid;
  logic [2:0] n_valid;
  logic eject_data, done_conv;
  int checks = 0, failures = 0;
  longint cyc = 0, t_eject = 0, t_done = 0;
  int n_eject = 0, n_done = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && eject_data) begin t_eject = cyc; n_eject++; end
    if (rst_n && done_conv) begin t_done = cyc; n_done++; end
  end

  data_processing #(.N(4)) dut (.clk, .rst_n, .gga_in, .done_in, .out_ready,
    .gga_out, .avg_pos, .avg_lat_ascii(a_lat), .avg_lon_ascii(a_lon),
    .avg_alt_ascii(a_alt), .gps_valid, .n_valid, .eject_data, .done_conv);

  initial begin
    repeat (500000) @(posedge clk);
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

  function automatic string dstr(logic [DIGITS-1:0][7:0] d);
    string s = "";
    for (int i = 0; i < DIGITS; i++) s = {s, string'(d[i])};
    return s;
  endfunction

  task automatic round(string lat[4], string lon[4], string alt[4], string sat[4],
                       bit hold_ready);
    longint sl = 0, so = 0, sa = 0, el, eo, ea;
    int c = 0;
    logic [3:0] m = 0;
    int order[4] = '{0, 1, 2, 3};
    int d0 = n_done;
    order.shuffle();
    for (int i = 0; i < 4; i++) begin
      if (fixval(sat[i], 0) >= 3) begin
        m[i] = 1; c++;
        sl += fixval(lat[i], 5); so += fixval(lon[i], 5); sa += fixval(alt[i], 1);
      end
    end
    el = c ? sl / c : 0; eo = c ? so / c : 0; ea = c ? sa / c : 0;
    if (hold_ready) out_ready <= 0;
    // three receivers first: nothing may start
    for (int k = 0; k < 4; k++) begin
      int g = order[k];
      gga_in[g] <= '{lat: mk(lat[g]), lon: mk(lon[g]), alt: mk(alt[g]), sat: mk(sat[g])};
      done_in <= 4'b1 << g;
      @(posedge clk);
      done_in <= 0;
      repeat ($urandom_range(3, 40)) @(posedge clk);
      if (k < 3) begin
        checks++;
        if (n_done != d0 || dut.state != 0) begin failures++; $display("started with %0d receivers", k + 1); end
      end
    end
    if (hold_ready) begin
      repeat (50) @(posedge clk);
      checks++;
      if (n_done != d0) begin failures++; $display("started while out_ready low"); end
      out_ready <= 1;
    end
    while (n_done == d0) @(posedge clk);
    @(posedge clk);
    checks += 6;
    if (avg_pos.lat != VAL_W'(el)) begin failures++; $display("lat %0d vs %0d", avg_pos.lat, el); end
    if (avg_pos.lon != VAL_W'(eo)) begin failures++; $display("lon %0d vs %0d", avg_pos.lon, eo); end
    if (avg_pos.alt != VAL_W'(ea)) begin failures++; $display("alt %0d vs %0d", avg_pos.alt, ea); end
    if (gps_valid != m || int'(n_valid) != c) begin failures++; $display("valid %b/%0d vs %b/%0d", gps_valid, n_valid, m, c); end
    if (dstr(a_lat) != $sformatf("%011d", el) || dstr(a_lon) != $sformatf("%011d", eo)
        || dstr(a_alt) != $sformatf("%011d", ea)) begin failures++; $display("ascii %s %s %s", dstr(a_lat), dstr(a_lon), dstr(a_alt)); end
    // eject to done_conv: SUM_W + VAL_W + 8 cycles, SUM_W = VAL_W + 3
    if (t_done - t_eject != longint'((VAL_W + 3) + VAL_W + 8)) begin
      failures++; $display("latency %0d", t_done - t_eject);
    end
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (gga_out[g].lat != mk(lat[g])) failures++;
    end
  endtask

  initial begin
    string lat[4] = '{"0756.89465", "0755.87746", "0756.88464", "0755.87475"};
    string lon[4] = '{"11238.31502", "11236.31419", "11231.31145", "11238.31611"};
    string alt[4] = '{"469.0", "465.0", "465.0", "478.0"};
    string sat[4] = '{"04", "04", "05", "04"};
    string sat3[4] = '{"04", "02", "05", "03"};
    string sat0[4] = '{"00", "02", "01", "00"};
    for (int i = 0; i < 4; i++) gga_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    round(lat, lon, alt, sat, 0);
    checks++;
    if (avg_pos.lat != 34'd75638287 || avg_pos.lon != 34'd1123606419 || avg_pos.alt != 34'd4692) failures++;
    round(lat, lon, alt, sat3, 1);
    round(lat, lon, alt, sat0, 0);
    for (int n = 0; n < 30; n++) begin
      string l[4], o[4], a[4], s[4];
      for (int i = 0; i < 4; i++) begin
        l[i] = $sformatf("%04d.%05d", $urandom_range(0, 9000), $urandom_range(0, 99999));
        o[i] = $sformatf("%05d.%05d", $urandom_range(0, 18000), $urandom_range(0, 99999));
        a[i] = $sformatf("%0d.%0d", $urandom_range(0, 20000), $urandom_range(0, 9));
        s[i] = $sformatf("%02d", $urandom_range(0, 12));
      end
      round(l, o, a, s, n % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
