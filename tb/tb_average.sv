// tb_average: checks the mean of the published latitude, longitude and
// altitude test values and of random values for every valid mask,
// including no valid receiver, and the fixed latency from start to done.
module tb_average;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [VAL_W-1:0] vals [4];
  logic [3:0] gps_valid = 0;
  logic [VAL_W-1:0] avg;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  average #(.N(4)) dut (.clk, .rst_n, .start, .vals, .gps_valid, .avg, .busy, .done);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint v[4], input logic [3:0] m);
    longint s = 0;
    int c = 0, lat;
    longint e;
    for (int i = 0; i < 4; i++) begin
      vals[i] <= m[i] ? VAL_W'(v[i]) : '0;
      if (m[i]) begin s += v[i]; c++; end
    end
    e = (c == 0) ? 0 : s / c;
    gps_valid <= m;
    start <= 1;
    @(posedge clk);
    start <= 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done);
    checks += 2;
    if (avg != VAL_W'(e)) begin failures++; $display("mask %b avg %0d vs %0d", m, avg, e); end
    // done is sampled one cycle after it is set
    if (lat != VAL_W + 3 + 2) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    longint lat_v[4] = '{75689465, 75587746, 75688464, 75587475};
    longint lon_v[4] = '{1123831502, 1123631419, 1123131145, 1123831611};
    longint alt_v[4] = '{4690, 4650, 4650, 4780};
    longint r[4];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(lat_v, 4'b1111);
    checks++; if (avg != 34'd75638287) failures++;
    run(lon_v, 4'b1111);
    checks++; if (avg != 34'd1123606419) failures++;
    run(alt_v, 4'b1111);
    checks++; if (avg != 34'd4692) failures++;
    for (int m = 0; m < 16; m++) run(lat_v, 4'(m));
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) r[i] = longint'({$urandom, $urandom}) & ((64'd1 << 34) - 1);
      run(r, 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
