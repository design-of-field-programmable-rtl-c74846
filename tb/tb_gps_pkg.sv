// tb_gps_pkg: helpers shared by the testbenches.
//
// gga_sentence() builds an NMEA $GPGGA sentence from its field strings; field order
// follows the GGA definition: time, lat, N/S, lon, E/W, fix, satellites,
// HDOP, altitude, unit, geoid separation, unit, age, station, checksum.
// The checksum is not computed because the design does not check it.
package tb_gps_pkg;

  function automatic string gga_sentence(string lat, string lon, string alt, string sat);
    return $sformatf("$GPGGA,041523.00,%s,S,%s,E,1,%s,0.91,%s,M,18.2,M,,*5B\r\n",
                     lat, lon, sat, alt);
  endfunction

  // Fixed-point value of a decimal string with frac implied fraction digits.
  function automatic longint fixval(string s, int frac);
    longint v = 0;
    int     nf = 0;
    bit     dot = 0;
    for (int i = 0; i < s.len(); i++) begin
      if (s[i] == ".") dot = 1;
      else if (s[i] >= "0" && s[i] <= "9") begin
        if (!dot || nf < frac) begin
          v = v * 10 + (s[i] - "0");
          if (dot) nf++;
        end
      end
    end
    for (int k = nf; k < frac; k++) v = v * 10;
    return v;
  endfunction

endpackage
