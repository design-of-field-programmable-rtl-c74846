// tb_buffer_ascii: delivers sentences to buffer_ascii in random channel order
// and checks that data_out changes only on eject_data, holds the newest
// capture of every channel, and that fresh/all_fresh track the arrivals,
// including a done that coincides with eject_data.
module tb_buffer_ascii;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0;
  gga_ascii_t gga_in [4];
  gga_ascii_t data_out [4];
  logic [3:0] done_in = 0, out_fresh, fresh;
  logic eject_data = 0, all_fresh;
  int checks = 0, failures = 0;
  gga_ascii_t model_cap [4];
  gga_ascii_t model_out [4];

  always #5 clk = ~clk;

  buffer_ascii #(.N(4)) dut (.clk, .rst_n, .gga_in, .done_in, .eject_data,
                             .data_out, .out_fresh, .fresh, .all_fresh);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gga_ascii_t rand_gga();
    gga_ascii_t g;
    for (int k = 0; k < $bits(gga_ascii_t) / 32 + 1; k++)
      g = {g, 32'($urandom)};
    return g;
  endfunction

  initial begin
    logic [3:0] mfresh = 0;
    for (int i = 0; i < 4; i++) begin gga_in[i] = '0; model_cap[i] = '0; model_out[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int step = 0; step < 400; step++) begin
      logic [3:0] d;
      logic       e;
      d = 4'($urandom) & 4'($urandom);
      e = ($urandom % 5 == 0);
      for (int i = 0; i < 4; i++) gga_in[i] <= rand_gga();
      done_in    <= d;
      eject_data <= e;
      @(posedge clk);
      #1;
      // model
      if (e) begin
        for (int i = 0; i < 4; i++) model_out[i] = model_cap[i];
      end
      for (int i = 0; i < 4; i++) if (d[i]) model_cap[i] = gga_in[i];
      mfresh = e ? d : (mfresh | d);
      checks++;
      if (fresh != mfresh || all_fresh != (&mfresh)) begin
        failures++; $display("step %0d fresh %b vs %b", step, fresh, mfresh);
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (data_out[i] != model_out[i]) begin failures++; $display("step %0d ch %0d data_out", step, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
