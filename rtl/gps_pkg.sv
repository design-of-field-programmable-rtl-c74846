// gps_pkg: types and constants shared by the multi-GPS data processing design.
//
// Four GPS receivers each deliver NMEA $GPGGA sentences over UART. From each
// sentence the design keeps four ASCII fields: latitude (ddmm.mmmmm), longitude
// (dddmm.mmmmm), altitude (metres) and the number of satellites in use. The
// fields travel through the design as fixed-size character buffers with a
// length, and after conversion as unsigned fixed-point integers in which the
// decimal point is implied: latitude and longitude carry 5 fraction digits,
// altitude 1, satellites 0. A value of 0756.89465 is thus held as 75689465.
// The field choice and the count of four receivers follow the design; the
// buffer sizes, the fixed-point scaling and the clock rate are choices of
// this implementation.
package gps_pkg;

  // Number of GPS receivers.
  localparam int unsigned NUM_GPS   = 4;
  // Characters kept per ASCII field; longer fields are truncated.
  localparam int unsigned FIELD_LEN = 12;
  localparam int unsigned LEN_W     = $clog2(FIELD_LEN + 1);
  // Width of a converted value. 9999999999 (lon 99999.99999) needs 34 bits.
  localparam int unsigned VAL_W     = 34;
  // Width of a satellite count.
  localparam int unsigned SAT_W     = 8;
  // Implied fraction digits per field.
  localparam int unsigned LAT_FRAC  = 5;
  localparam int unsigned LON_FRAC  = 5;
  localparam int unsigned ALT_FRAC  = 1;
  // Integer digits printed for the averaged fields.
  localparam int unsigned LAT_INT   = 4;
  localparam int unsigned LON_INT   = 5;
  localparam int unsigned ALT_INT   = 5;
  // Decimal digits produced by integer_to_ascii (enough for VAL_W bits).
  localparam int unsigned DIGITS    = 11;
  // A receiver with at least this many satellites is valid.
  localparam int unsigned MIN_SAT   = 3;
  // System clock and serial rate.
  localparam int unsigned CLK_HZ    = 50_000_000;
  localparam int unsigned BAUD      = 9600;
  localparam int unsigned BIT_CYCLES = CLK_HZ / BAUD;

  // ASCII codes used by the parser and the packet builder.
  localparam logic [7:0] CH_DOLLAR = 8'h24;
  localparam logic [7:0] CH_G      = 8'h47;
  localparam logic [7:0] CH_P      = 8'h50;
  localparam logic [7:0] CH_A      = 8'h41;
  localparam logic [7:0] CH_COMMA  = 8'h2C;
  localparam logic [7:0] CH_LF     = 8'h0A;
  localparam logic [7:0] CH_CR     = 8'h0D;
  localparam logic [7:0] CH_DOT    = 8'h2E;
  localparam logic [7:0] CH_ZERO   = 8'h30;

  // One ASCII field: characters in arrival order (chars[0] first) and a count.
  typedef struct packed {
    logic [FIELD_LEN-1:0][7:0] chars;
    logic [LEN_W-1:0]          len;
  } ascii_field_t;

  // The four fields kept from one $GPGGA sentence.
  typedef struct packed {
    ascii_field_t lat;
    ascii_field_t lon;
    ascii_field_t alt;
    ascii_field_t sat;
  } gga_ascii_t;

  // The same fields after conversion to integers.
  typedef struct packed {
    logic [VAL_W-1:0] lat;
    logic [VAL_W-1:0] lon;
    logic [VAL_W-1:0] alt;
    logic [SAT_W-1:0] sat;
  } gga_int_t;

  // Averaged position.
  typedef struct packed {
    logic [VAL_W-1:0] lat;
    logic [VAL_W-1:0] lon;
    logic [VAL_W-1:0] alt;
  } position_t;

endpackage
