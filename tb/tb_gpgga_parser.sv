// tb_gpgga_parser: feeds byte streams straight into gpgga_parser and checks
// the extracted fields of the published four test sentences, that other
// sentences ($GPGSV, $GPRMC, $GPGGB) are ignored, that a restarted match
// ("$GP$GPGGA") is found, the state sequence of the state table, and that
// done comes one cycle after the line feed.
module tb_gpgga_parser;
  import gps_pkg::*;
  import tb_gps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_byte = 0;
  logic rx_valid = 0;
  gga_ascii_t gga;
  logic done;
  logic [2:0] st;
  int checks = 0, failures = 0;
  int ndone = 0;

  always #5 clk = ~clk;

  gpgga_parser dut (.clk, .rst_n, .rx_byte, .rx_valid, .gga, .done, .state_o(st));

  always @(posedge clk) if (done) ndone++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] b);
    rx_byte <= b; rx_valid <= 1;
    @(posedge clk);
    rx_valid <= 0;
    repeat (2) @(posedge clk);
  endtask

  task automatic put_str(input string s);
    for (int i = 0; i < s.len(); i++) put(s[i]);
  endtask

  function automatic string fstr(ascii_field_t f);
    string s = "";
    for (int i = 0; i < f.len; i++) s = {s, string'(f.chars[i])};
    return s;
  endfunction

  task automatic check_field(string name, ascii_field_t f, string exp);
    checks++;
    if (fstr(f) != exp) begin
      failures++; $display("%s: got '%s' expected '%s'", name, fstr(f), exp);
    end
  endtask

  string lat[4] = '{"0756.89465", "0755.87746", "0756.88464", "0755.87475"};
  string lon[4] = '{"11238.31502", "11236.31419", "11231.31145", "11238.31611"};
  string alt[4] = '{"469.0", "465.0", "465.0", "478.0"};
  string sat[4] = '{"04", "04", "05", "04"};

  initial begin
    string s;
    int d0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // state sequence of the state table
    begin
      string hdr = "$GPGGA,";
      int exp_st[7] = '{1, 2, 3, 4, 5, 6, 7};
      for (int i = 0; i < 7; i++) begin
        put(hdr[i]);
        checks++;
        if (st != 3'(exp_st[i])) begin failures++; $display("state %0d after '%c'", st, hdr[i]); end
      end
      put_str("\n");
      checks++;
      if (st != 3'd0) failures++;
    end
    d0 = ndone;
    for (int g = 0; g < 4; g++) begin
      put_str("$GPGSV,3,1,11,03,03,111,00,04,15,270,00,06,01,010,00,13,06,292,00*74\r\n");
      put_str("$GPRMC,041523.00,A,0756.1,S,11238.2,E,0.0,0.0,010322,,,A*6E\r\n");
      put_str("$GPGGB,1,2,3,4,5,6,7,8,9\r\n");
      s = gga_sentence(lat[g], lon[g], alt[g], sat[g]);
      for (int i = 0; i < s.len(); i++) begin
        rx_byte <= s[i]; rx_valid <= 1;
        @(posedge clk);
        rx_valid <= 0;
        if (s[i] == 8'h0A) begin
          @(posedge clk);  // done is registered: visible one cycle later
          checks++;
          if (!done) begin failures++; $display("done not one cycle after LF"); end
        end
        @(posedge clk);
        @(posedge clk);
      end
      check_field("lat", gga.lat, lat[g]);
      check_field("lon", gga.lon, lon[g]);
      check_field("alt", gga.alt, alt[g]);
      check_field("sat", gga.sat, sat[g]);
    end
    checks++;
    if (ndone - d0 != 4) begin failures++; $display("done count %0d", ndone - d0); end
    // restart inside the header and an over-long field
    put_str("$GP$GPGGA,1,123456789012345,N,2,E,1,00,1,-5.5,M\r\n");
    check_field("lat trunc", gga.lat, "123456789012");
    check_field("sat", gga.sat, "00");
    check_field("alt", gga.alt, "-5.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
