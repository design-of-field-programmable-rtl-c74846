// packet_controller: merges the averaged position and the raw data of every
// receiver into one text packet, stores it in packet_ram and sends it byte by
// byte through uart_tx.
//
// Packet layout (one line per receiver, then one line for the average):
//   G1,<lat>,<lon>,<alt>,<sat>\r\n  ... G4,...\r\n
//   AV,<dddd.ddddd>,<ddddd.ddddd>,<ddddd.d>,<n>\r\n
// The receiver lines repeat the ASCII fields exactly as they were received.
// The average line prints the digits from integer_to_ascii with the decimal
// point put back (4+5 digits for latitude, 5+5 for longitude, 5+1 for
// altitude) and n, the number of receivers that entered the average.
//
// Operation: a start pulse (the done_conv of the conversion) moves the
// machine from IDLE to DIGIT, where one packet byte is written to the RAM per
// cycle. The packet is walked as groups of twelve segments, each a literal
// character or a field of known length. Then TULIS (write) reads the bytes
// back in order and hands each to the transmitter, waiting for its tx_done.
// busy is high from start until the last stop bit has been sent; sent pulses
// at that point. Inputs must stay stable while busy.
//
// Timing: building takes about one cycle per byte; sending takes
// 10 * CLKS_PER_BIT + 4 cycles per byte. The idle/digit/write states, the
// RAM and the merging of average and input data follow the original design; the
// text layout is this design's choice.
module packet_controller
  import gps_pkg::*;
#(
  parameter int unsigned N     = NUM_GPS,
  parameter int unsigned DEPTH = 512
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  gga_ascii_t             gga     [N],  // raw fields per receiver
  input  logic [DIGITS-1:0][7:0] avg_lat,      // ascii[0] most significant
  input  logic [DIGITS-1:0][7:0] avg_lon,
  input  logic [DIGITS-1:0][7:0] avg_alt,
  input  logic [2:0]             n_valid,
  // to uart_tx
  output logic                   tx_start,
  output logic [7:0]             tx_data,
  input  logic                   tx_busy,
  input  logic                   tx_done,
  output logic                   busy,
  output logic                   sent,
  output logic [$clog2(DEPTH)-1:0] pkt_len       // bytes in the last packet
);

  localparam int unsigned AW      = $clog2(DEPTH);
  localparam int unsigned SEGS    = 12;          // segments per line
  localparam int unsigned GRP_W   = $clog2(N + 1);
  localparam int unsigned GI_W    = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [2:0] {IDLE, DIGIT, TULIS_RD, TULIS_GO, TULIS_WAIT} pc_state_t;

  pc_state_t        state;
  logic [GRP_W-1:0] grp;       // 0..N-1 receiver lines, N average line
  logic [GI_W-1:0]  gi;        // grp as an index into gga
  logic [3:0]       seg;
  logic [LEN_W-1:0] idx;       // character index inside a field segment
  logic [AW-1:0]    waddr;
  logic [AW-1:0]    raddr;
  logic             wr_en;
  logic [7:0]       rd_data;

  // Character idx of an averaged field printed as INT digits '.' FRAC digits.
  function automatic logic [7:0] avg_char(logic [DIGITS-1:0][7:0] a,
                                          int unsigned ni, int unsigned nf,
                                          logic [LEN_W-1:0] i);
    int unsigned base = DIGITS - ni - nf;
    int unsigned k    = int'(i);
    if (k < ni)       return a[base + k];
    else if (k == ni) return CH_DOT;
    else              return a[base + k - 1];
  endfunction

  // Current segment: literal or field, its character and its length.
  logic             seg_is_field;
  logic [7:0]       seg_char;
  logic [LEN_W-1:0] seg_len;
  ascii_field_t     fld;

  assign gi = GI_W'(grp);

  always_comb begin
    seg_is_field = 1'b0;
    seg_char     = CH_COMMA;
    seg_len      = LEN_W'(1);
    fld          = '0;
    if (grp < GRP_W'(N)) begin
      unique case (seg)
        4'd0:  seg_char = 8'h47;                       // 'G'
        4'd1:  seg_char = 8'h31 + 8'(grp);             // '1'..'4'
        4'd3:  begin seg_is_field = 1'b1; fld = gga[gi].lat; end
        4'd5:  begin seg_is_field = 1'b1; fld = gga[gi].lon; end
        4'd7:  begin seg_is_field = 1'b1; fld = gga[gi].alt; end
        4'd9:  begin seg_is_field = 1'b1; fld = gga[gi].sat; end
        4'd10: seg_char = CH_CR;
        4'd11: seg_char = CH_LF;
        default: seg_char = CH_COMMA;
      endcase
      if (seg_is_field) begin
        seg_len  = fld.len;
        seg_char = fld.chars[idx];
      end
    end else begin
      unique case (seg)
        4'd0:  seg_char = 8'h41;                       // 'A'
        4'd1:  seg_char = 8'h56;                       // 'V'
        4'd3:  begin
          seg_is_field = 1'b1;
          seg_len  = LEN_W'(LAT_INT + LAT_FRAC + 1);
          seg_char = avg_char(avg_lat, LAT_INT, LAT_FRAC, idx);
        end
        4'd5:  begin
          seg_is_field = 1'b1;
          seg_len  = LEN_W'(LON_INT + LON_FRAC + 1);
          seg_char = avg_char(avg_lon, LON_INT, LON_FRAC, idx);
        end
        4'd7:  begin
          seg_is_field = 1'b1;
          seg_len  = LEN_W'(ALT_INT + ALT_FRAC + 1);
          seg_char = avg_char(avg_alt, ALT_INT, ALT_FRAC, idx);
        end
        4'd9:  seg_char = CH_ZERO + 8'(n_valid);
        4'd10: seg_char = CH_CR;
        4'd11: seg_char = CH_LF;
        default: seg_char = CH_COMMA;
      endcase
    end
  end

  // A field segment that is used up (or empty) writes nothing this cycle.
  assign wr_en = (state == DIGIT) && !(seg_is_field && idx >= seg_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      grp      <= '0;
      seg      <= '0;
      idx      <= '0;
      waddr    <= '0;
      raddr    <= '0;
      tx_start <= 1'b0;
      tx_data  <= '0;
      sent     <= 1'b0;
      pkt_len  <= '0;
    end else begin
      tx_start <= 1'b0;
      sent     <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            state <= DIGIT;
            grp   <= '0;
            seg   <= '0;
            idx   <= '0;
            waddr <= '0;
          end
        end
        DIGIT: begin
          if (wr_en) waddr <= waddr + 1'b1;
          if (seg_is_field && idx + 1'b1 < seg_len) begin
            idx <= idx + 1'b1;
          end else begin
            idx <= '0;
            if (seg == 4'(SEGS - 1)) begin
              seg <= '0;
              if (grp == GRP_W'(N)) begin
                state   <= TULIS_RD;
                raddr   <= '0;
                pkt_len <= waddr + AW'(wr_en);
              end else begin
                grp <= grp + 1'b1;
              end
            end else begin
              seg <= seg + 1'b1;
            end
          end
        end
        TULIS_RD: state <= TULIS_GO;        // RAM read latency
        TULIS_GO: begin
          if (!tx_busy) begin
            tx_data  <= rd_data;
            tx_start <= 1'b1;
            state    <= TULIS_WAIT;
          end
        end
        TULIS_WAIT: begin
          if (tx_done) begin
            if (raddr + 1'b1 == pkt_len) begin
              state <= IDLE;
              sent  <= 1'b1;
            end else begin
              raddr <= raddr + 1'b1;
              state <= TULIS_RD;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  packet_ram #(.DEPTH(DEPTH)) u_ram (
    .clk, .wr_en, .wr_addr(waddr), .wr_data(seg_char),
    .rd_addr(raddr), .rd_data
  );

endmodule
