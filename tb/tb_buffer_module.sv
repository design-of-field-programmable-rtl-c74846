// tb_buffer_module: loads random positions with all sixteen gps_valid masks
// of the buffer table and checks that exactly the marked receivers are
// passed and the others read 0, and that nothing changes without load.
module tb_buffer_module;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  position_t pos_in [4], pos_out [4];
  logic [3:0] gps_valid = 0, valid_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  buffer_module #(.N(4)) dut (.clk, .rst_n, .load, .pos_in, .gps_valid, .pos_out, .valid_o);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic position_t rpos();
    position_t p;
    p.lat = {2'($urandom), 32'($urandom)};
    p.lon = {2'($urandom), 32'($urandom)};
    p.alt = {2'($urandom), 32'($urandom)};
    return p;
  endfunction

  initial begin
    position_t ref_pos [4];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int m = 0; m < 32; m++) begin
      for (int i = 0; i < 4; i++) begin ref_pos[i] = rpos(); pos_in[i] <= ref_pos[i]; end
      gps_valid <= 4'(m);
      load <= 1;
      @(posedge clk);
      load <= 0;
      // change the inputs: outputs must hold
      for (int i = 0; i < 4; i++) pos_in[i] <= rpos();
      gps_valid <= ~4'(m);
      @(posedge clk);
      #1;
      checks++;
      if (valid_o != 4'(m)) failures++;
      for (int i = 0; i < 4; i++) begin
        position_t e;
        e = m[i] ? ref_pos[i] : '0;
        checks++;
        if (pos_out[i] != e) begin failures++; $display("mask %b gps %0d", 4'(m), i + 1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
