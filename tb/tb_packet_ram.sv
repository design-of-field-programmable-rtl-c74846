// tb_packet_ram: writes random bytes to random addresses while reading, and
// checks every read against a model one cycle later, including read of an
// address written in the same cycle (old data is returned).
module tb_packet_ram;
  logic clk = 0;
  logic wr_en = 0;
  logic [8:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [7:0] model [512];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  packet_ram #(.DEPTH(512)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int a = 0; a < 512; a++) begin
      wr_en <= 1; wr_addr <= 9'(a); wr_data <= 8'(a * 7 + 3); model[a] = 8'(a * 7 + 3);
      @(posedge clk);
    end
    wr_en <= 0;
    for (int n = 0; n < 3000; n++) begin
      logic [8:0] ra, wa;
      logic [7:0] wd;
      logic we;
      ra = 9'($urandom); wa = ($urandom % 4 == 0) ? ra : 9'($urandom);
      wd = 8'($urandom); we = $urandom % 2;
      rd_addr <= ra; wr_addr <= wa; wr_data <= wd; wr_en <= we;
      exp = model[ra];
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
      checks++;
      if (rd_data != exp) begin failures++; $display("addr %0d got %h exp %h", ra, rd_data, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
