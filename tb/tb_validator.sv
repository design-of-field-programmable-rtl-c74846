// tb_validator: checks gps_valid for every combination of satellite counts
// around the threshold of three, plus random counts.
module tb_validator;
  import gps_pkg::*;
  logic [SAT_W-1:0] sat [4];
  logic [3:0] gps_valid;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  validator #(.N(4)) dut (.sat, .gps_valid);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals[6] = '{0, 1, 2, 3, 4, 12};
    for (int n = 0; n < 1296 + 200; n++) begin
      logic [3:0] exp;
      for (int i = 0; i < 4; i++) begin
        if (n < 1296) sat[i] = SAT_W'(vals[(n / (6 ** i)) % 6]);
        else          sat[i] = SAT_W'($urandom);
        exp[i] = (int'(sat[i]) >= 3);
      end
      #1;
      checks++;
      if (gps_valid != exp) begin failures++; $display("sat %0d %0d %0d %0d -> %b", sat[0], sat[1], sat[2], sat[3], gps_valid); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
