// buffer_ascii: gathers the parsed ASCII fields of all GPS channels, which
// arrive at unrelated times, and releases them together as one set.
//
// Each channel has a capture register that is loaded whenever that channel's
// parser signals done, and a fresh flag that is set at the same time. When
// eject_data is 1 the capture registers are copied to the output registers
// in one cycle and the fresh flags are cleared, so the output stays stable
// while the rest of the system processes and sends it, even as new sentences
// arrive. all_fresh tells the controller that every channel has delivered a
// sentence since the last eject. A done arriving in the eject cycle is kept
// and counts as fresh for the next set.
//
// Timing: data_out and out_fresh change on the clock edge after eject_data.
// Holding the data until eject_data is as in the original design; the fresh
// flags and the copy-on-eject double buffer are this design's choices.
module buffer_ascii
  import gps_pkg::*;
#(
  parameter int unsigned N = NUM_GPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  gga_ascii_t   gga_in   [N],  // fields from the parser channels
  input  logic [N-1:0] done_in,       // per-channel new-sentence pulse
  input  logic         eject_data,    // release the captured set
  output gga_ascii_t   data_out [N],  // released set, stable between ejects
  output logic [N-1:0] out_fresh,     // which channels of data_out were new
  output logic [N-1:0] fresh,         // channels captured since last eject
  output logic         all_fresh      // every channel has a new sentence
);

  gga_ascii_t capture [N];

  assign all_fresh = &fresh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        capture[i]  <= '0;
        data_out[i] <= '0;
      end
      fresh     <= '0;
      out_fresh <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (done_in[i]) capture[i] <= gga_in[i];
      end
      if (eject_data) begin
        for (int i = 0; i < N; i++) data_out[i] <= capture[i];
        out_fresh <= fresh;
        fresh     <= done_in;
      end else begin
        fresh <= fresh | done_in;
      end
    end
  end

endmodule
