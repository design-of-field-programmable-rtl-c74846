// tb_data_parser: drives the four serial inputs of data_parser at the same
// time with the published test sentences, each preceded by other NMEA
// sentences and sent with a different character gap, and checks every
// channel's fields and one done pulse per channel.
module tb_data_parser;
  import gps_pkg::*;
  import tb_gps_pkg::*;
  localparam int unsigned CPB = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0] rx;
  gga_ascii_t gga [4];
  logic [3:0] done, ferr;
  int checks = 0, failures = 0;
  int ndone [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  nmea_source #(.CLKS_PER_BIT(CPB), .GAP_BITS(0)) s0 (.clk, .tx(rx[0]));
  nmea_source #(.CLKS_PER_BIT(CPB), .GAP_BITS(1)) s1 (.clk, .tx(rx[1]));
  nmea_source #(.CLKS_PER_BIT(CPB), .GAP_BITS(3)) s2 (.clk, .tx(rx[2]));
  nmea_source #(.CLKS_PER_BIT(CPB), .GAP_BITS(2)) s3 (.clk, .tx(rx[3]));

  data_parser #(.N(4), .CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .gga, .done, .frame_err(ferr));

  always @(posedge clk) if (rst_n) for (int i = 0; i < 4; i++) if (done[i]) ndone[i]++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string fstr(ascii_field_t f);
    string s = "";
    for (int i = 0; i < f.len; i++) s = {s, string'(f.chars[i])};
    return s;
  endfunction

  task automatic chk(string name, ascii_field_t f, string exp);
    checks++;
    if (fstr(f) != exp) begin failures++; $display("%s '%s' vs '%s'", name, fstr(f), exp); end
  endtask

  string lat[4] = '{"0756.89465", "0755.87746", "0756.88464", "0755.87475"};
  string lon[4] = '{"11238.31502", "11236.31419", "11231.31145", "11238.31611"};
  string alt[4] = '{"469.0", "465.0", "465.0", "478.0"};
  string sat[4] = '{"04", "04", "05", "04"};
  string other = "$GPVTG,0.0,T,,M,0.0,N,0.0,K,A*0D\r\n";

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    fork
      begin s0.send_string({other, gga_sentence(lat[0], lon[0], alt[0], sat[0])}); end
      begin s1.send_string({gga_sentence(lat[1], lon[1], alt[1], sat[1]), other}); end
      begin s2.send_string({other, other, gga_sentence(lat[2], lon[2], alt[2], sat[2])}); end
      begin s3.send_string(gga_sentence(lat[3], lon[3], alt[3], sat[3])); end
    join
    repeat (CPB * 4) @(posedge clk);
    for (int g = 0; g < 4; g++) begin
      chk("lat", gga[g].lat, lat[g]);
      chk("lon", gga[g].lon, lon[g]);
      chk("alt", gga[g].alt, alt[g]);
      chk("sat", gga[g].sat, sat[g]);
      checks++;
      if (ndone[g] != 1) begin failures++; $display("ch %0d done %0d", g, ndone[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
