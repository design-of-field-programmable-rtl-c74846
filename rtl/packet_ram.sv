// packet_ram: byte memory that holds one outgoing packet.
//
// A simple dual-port RAM of DEPTH bytes: one synchronous write port and one
// read port with a registered output (rd_data is valid the cycle after
// rd_addr is presented), which maps onto FPGA block RAM. The memory is not
// reset. The original design says that the transmitted bytes come from RAM; the size
// and the port arrangement are this design's choices.
module packet_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
