// gpgga_parser: finds $GPGGA sentences in the byte stream of one GPS sensor
// and extracts latitude, longitude, altitude and the satellite count.
//
// Sentence detection is a brute-force string match done one received byte at
// a time by a state machine: Dollar -> DetG -> DetP -> DetG2 -> DetG3 -> DetA
// -> DetComma -> ParsingData, advancing on '$', 'G', 'P', 'G', 'G', 'A', ','.
// Any other byte sends the machine back to Dollar, so other sentences such as
// $GPGSV or $GPRMC are skipped. A mismatching byte that is itself '$' is taken
// as the start of a new attempt (the search window shifts by one character).
// In ParsingData the commas are counted. The characters of field 1 (lat),
// field 3 (lon), field 6 (satellites) and field 8 (altitude), counting the
// field after "$GPGGA," as field 0 (UTC time), are stored. A line feed ends
// the sentence: the fields are copied to the gga output and done pulses for
// one cycle, and the machine returns to Dollar.
//
// Interface: rx_byte/rx_valid from uart_rx; gga holds the fields of the last
// complete sentence until the next one ends. Timing: done follows the rx_valid
// of the line feed by one cycle. The states and their triggers follow the
// state table of the original design; the field positions are those of the NMEA GGA
// sentence; the '$' restart and the field truncation at FIELD_LEN characters
// are this design's choices.
module gpgga_parser
  import gps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_byte,
  input  logic       rx_valid,
  output gga_ascii_t gga,        // fields of the last complete sentence
  output logic       done,       // one-cycle pulse: gga updated
  output logic [2:0] state_o     // current parser state, for observation
);

  typedef enum logic [2:0] {
    DOLLAR, DET_G, DET_P, DET_G2, DET_G3, DET_A, DET_COMMA, PARSING_DATA
  } parse_state_t;

  parse_state_t state;
  gga_ascii_t   work;
  logic [3:0]   field_idx;

  assign state_o = state;

  // Append one character to a field unless it is full.
  function automatic ascii_field_t append(ascii_field_t f, logic [7:0] c);
    ascii_field_t r = f;
    if (f.len < LEN_W'(FIELD_LEN)) begin
      r.chars[f.len] = c;
      r.len          = f.len + 1'b1;
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= DOLLAR;
      work      <= '0;
      gga       <= '0;
      field_idx <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rx_valid) begin
        unique case (state)
          DOLLAR:    state <= (rx_byte == CH_DOLLAR) ? DET_G : DOLLAR;
          DET_G:     state <= (rx_byte == CH_G) ? DET_P
                            : (rx_byte == CH_DOLLAR) ? DET_G : DOLLAR;
          DET_P:     state <= (rx_byte == CH_P) ? DET_G2
                            : (rx_byte == CH_DOLLAR) ? DET_G : DOLLAR;
          DET_G2:    state <= (rx_byte == CH_G) ? DET_G3
                            : (rx_byte == CH_DOLLAR) ? DET_G : DOLLAR;
          DET_G3:    state <= (rx_byte == CH_G) ? DET_A
                            : (rx_byte == CH_DOLLAR) ? DET_G : DOLLAR;
          DET_A:     state <= (rx_byte == CH_A) ? DET_COMMA
                            : (rx_byte == CH_DOLLAR) ? DET_G : DOLLAR;
          DET_COMMA: begin
            if (rx_byte == CH_COMMA) begin
              state     <= PARSING_DATA;
              work      <= '0;
              field_idx <= '0;
            end else begin
              state <= (rx_byte == CH_DOLLAR) ? DET_G : DOLLAR;
            end
          end
          PARSING_DATA: begin
            if (rx_byte == CH_LF) begin
              gga   <= work;
              done  <= 1'b1;
              state <= DOLLAR;
            end else if (rx_byte == CH_COMMA) begin
              if (field_idx != 4'hF) field_idx <= field_idx + 1'b1;
            end else begin
              unique case (field_idx)
                4'd1:    work.lat <= append(work.lat, rx_byte);
                4'd3:    work.lon <= append(work.lon, rx_byte);
                4'd6:    work.sat <= append(work.sat, rx_byte);
                4'd8:    work.alt <= append(work.alt, rx_byte);
                default: ;
              endcase
            end
          end
          default: state <= DOLLAR;
        endcase
      end
    end
  end

endmodule
