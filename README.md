# Multi-GPS receiver data processing on an FPGA

A single commercial GPS receiver wanders by metres around its true position.
This design reads four GPS receivers at once, keeps only those that track
enough satellites, averages their latitude, longitude and altitude, and sends
the average to a PC over a serial line, together with the raw readings of
each receiver. All four receivers get their own serial receiver and sentence
parser, so no receiver waits for another. A microcontroller solution would have
to poll them one after another.

It follows the architecture of a published FPGA design for tracking ballistic
objects with several GPS receivers (Abidin, Aryawiratama, Muttaqin, Miyauchi).
That description names the blocks and gives the parser state machine, the
satellite rule, the averaging rule, the double-dabble conversion and the
9600 bps output. Everything else here is this implementation's own: the clock
rate, the number format, when a round starts, the packet layout and all
handshakes. Those choices are listed in the section "What is fixed and what is
chosen".

## Data flow

```
 gps_rx[0] ─ uart_rx ─ gpgga_parser ─┐                       data_processing
 gps_rx[1] ─ uart_rx ─ gpgga_parser ─┤   ┌──────────────────────────────────────────────────┐
 gps_rx[2] ─ uart_rx ─ gpgga_parser ─┼──►│ buffer_ascii ─► ascii_to_integer ─► buffer_module │
 gps_rx[3] ─ uart_rx ─ gpgga_parser ─┘   │                     │ (sat)          ▲ gps_valid │
            (data_parser)                │                     └─► validator ───┘           │
                                         │ average ×3 ─► integer_to_ascii ×3 ─► done_conv    │
                                         └──────────────────────────────────────────────────┘
                                                         │ ASCII set + averaged digits
                                          packet_controller (+ packet_ram) ─► uart_tx ─► pc_tx
```

`multi_gps_top` wires these together. `gps_pkg` holds the shared types and
constants.

## Parsing the receivers' output

Each receiver emits a stream of NMEA text sentences ($GPGSV, $GPRMC, $GPGGA,
...), one line each. Only `$GPGGA` carries everything needed: position,
altitude and the number of satellites used. `gpgga_parser` finds it with a
byte-at-a-time string match. Each state expects one character:

| state      | next state on        | character |
|------------|----------------------|-----------|
| Dollar     | DetG                 | `$` 0x24  |
| DetG       | DetP                 | `G` 0x47  |
| DetP       | DetG2                | `P` 0x50  |
| DetG2      | DetG3                | `G` 0x47  |
| DetG3      | DetA                 | `G` 0x47  |
| DetA       | DetComma             | `A` 0x41  |
| DetComma   | ParsingData          | `,` 0x2C  |
| ParsingData| Dollar               | LF 0x0A   |

Any other character returns the machine to Dollar, which skips the other
sentence types. If that character is itself `$`, the machine goes straight to
DetG, so that a new sentence starting right after a broken one is not missed.
In ParsingData the parser counts commas and stores four fields: field 1
(latitude, `ddmm.mmmmm`), field 3 (longitude, `dddmm.mmmmm`), field 6
(satellites) and field 8 (altitude in metres). Field 0 is the UTC time that
follows `$GPGGA,`. The line feed copies the fields to the output and pulses
`done`. Fields are kept as up to 12 ASCII characters plus a length
(`ascii_field_t`). Hemisphere letters and the checksum are not used.

## Rounds: collecting a consistent set

This is the part with the most behaviour of its own. The receivers finish
their sentences at unrelated times, and a packet takes about 0.2 s to send.
`buffer_ascii` therefore has two register sets:

* a **capture** set, written by each channel whenever its parser finishes a
  sentence, with a per-channel `fresh` flag;
* an **output** set, loaded from the capture set in one cycle when
  `eject_data` is 1. The `fresh` flags are cleared at the same time.

The sequencer in `data_processing` asserts `eject_data` only when every
channel is fresh (`all_fresh`) and the packet side is idle (`out_ready`).
The output set then stays unchanged until the packet has been sent, while new
sentences already collect in the capture set for the next round. If a
receiver delivers two sentences within one round, only the newer one is used.
If a receiver stops sending altogether, no new round starts. There is no
timeout.

A round then runs as follows:

1. **EJECT**: the released fields go through `ascii_to_integer`, which is
   combinational.
2. **LOAD**: `validator` sets `gps_valid[i]` when receiver i+1 reports 3 or
   more satellites. `buffer_module` registers the values and outputs 0 for
   every receiver whose bit is 0. Bit 0 belongs to GPS1, so `0101` means that
   GPS1 and GPS3 are used.
3. **AVG**: three `average` units (one each for latitude, longitude and
   altitude) add the four masked values and divide by the number of valid
   receivers. The divider is a restoring shift-subtract divider, so division
   by 3 needs no special case. The result is truncated. With no valid
   receiver the result is 0.
4. **CONV**: three `integer_to_ascii` units convert the averages to 11
   decimal digits by double dabble: before each of the 34 shifts, 3 is added
   to every BCD digit of 5 or more. Placing `0011` above each BCD digit
   gives its ASCII code.
5. `done_conv` starts the packet.

From `eject_data` to `done_conv` takes SUM_W + VAL_W + 8 = 79 clock cycles,
where SUM_W = 37 is the width of the sum. This is negligible next to the
serial times.

## Number format

`ascii_to_integer` drops the decimal point and keeps a fixed number of
fraction digits. Latitude and longitude keep 5 and altitude keeps 1.
`0756.89465` becomes 75 689 465 and `469.0` becomes 4690. `469` also becomes
4690, because missing fraction digits are filled with zeros and extra ones are
truncated. Values are 34 bits wide, enough for `99999.99999`. Latitude and
longitude are averaged in their NMEA form, degrees followed by decimal minutes.
This is exact as long as the receivers agree on the whole degrees, which holds
for receivers a few centimetres apart. Signs are not represented: a negative
altitude is read as positive, and the S/W hemispheres are dropped.

## Output packet

`packet_controller` first writes the whole packet into `packet_ram`
(512 bytes, one byte per cycle, state DIGIT). In state TULIS it then reads the
bytes back one at a time and passes each to `uart_tx`. The text is:

```
G1,<lat>,<lon>,<alt>,<sat>\r\n        raw fields of receiver 1, as received
G2,...\r\n   G3,...\r\n   G4,...\r\n
AV,<dddd.ddddd>,<ddddd.ddddd>,<ddddd.d>,<n>\r\n
```

The `AV` line holds the average, printed at fixed width with its decimal
point restored, and n, the number of receivers in the average. For the test
data below, the packet is 181 bytes:

```
G1,0756.89465,11238.31502,469.0,04
G2,0755.87746,11236.31419,465.0,04
G3,0756.88464,11231.31145,465.0,05
G4,0755.87475,11238.31611,478.0,04
AV,0756.38287,11236.06419,00469.2,4
```

## Serial timing

The default clock is 50 MHz and all lines run at 9600 bps, 8N1:
`CLKS_PER_BIT = 5208`. `uart_rx` synchronises its input with two flip-flops,
checks the start bit at mid-bit and samples each bit in its middle. It drops a
byte whose stop bit is low and pulses `frame_err` instead. On the output, one
byte takes 10 × 5208 + 4 cycles (1.04 ms). A packet of 181 to 261 bytes
therefore takes 0.19 to 0.27 s, which fits inside the usual 1 s interval of
GPS receivers. To use another clock, set `CLK_HZ` in `gps_pkg`, or override
`CLKS_PER_BIT` on `multi_gps_top`.

## Interface of `multi_gps_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; active-low asynchronous reset |
| gps_rx | in | N | serial line of receiver i+1 |
| pc_tx | out | 1 | serial line to the PC |
| avg_pos | out | 3×34 | last average (lat, lon, alt) in the fixed-point units above |
| gps_valid | out | N | receivers used in the last average |
| sentence_done | out | N | pulse per parsed $GPGGA |
| rx_frame_err | out | N | pulse per framing error |
| done_conv | out | 1 | averages ready, packet starts |
| packet_sent | out | 1 | last packet byte sent |

Parameters: `N` (receivers, default 4) and `CLKS_PER_BIT` (default 5208).
The packet layout in `packet_controller` assumes N ≤ 9.

## What is fixed and what is chosen

Taken from the original design:

* four receivers read in parallel;
* a UART receiver and a parser per receiver;
* the $GPGGA state machine and its states;
* the four extracted fields;
* the rule "3 or more satellites is valid";
* invalid receivers replaced by 0 and left out of the divisor;
* the chain buffer_ASCII → ASCII_to_integer → buffer_module/validator →
  average → integer_to_ASCII;
* double dabble with the 0011 prefix;
* average and raw data merged into one packet held in RAM;
* the idle / digit / write ("tulis") states of the output controller;
* 8-bit transfers at 9600 bps.

Chosen here:

* the 50 MHz clock and the 9600 bps input rate;
* 8N1 framing;
* the asynchronous reset;
* the `$` restart in the parser;
* 12-character fields;
* the fixed-point format;
* the start-a-round-when-all-are-fresh rule and the double buffer;
* the sequencer;
* one averaging and one conversion unit per quantity;
* truncating division;
* the packet text;
* what the "digit" state does (writing the packet into RAM).

Known limits:

* A round waits for all N receivers. With one receiver connected to the
  default four-channel build, nothing is sent. Build with `N = 1` for a single
  receiver.
* There is no checksum test. A sentence with a corrupted field is averaged
  anyway, unless its satellite count is below 3.
* Negative altitude and the hemisphere are not handled.
* Accuracy gains (RMSE) depend on the receivers and are not reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/gps_pkg.sv` | constants, field and position types |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial receiver and transmitter |
| `rtl/gpgga_parser.sv`, `rtl/data_parser.sv` | sentence parser, four-channel parser block |
| `rtl/buffer_ascii.sv`, `rtl/ascii_to_integer.sv`, `rtl/validator.sv`, `rtl/buffer_module.sv`, `rtl/average.sv`, `rtl/integer_to_ascii.sv` | processing entities |
| `rtl/data_processing.sv` | processing chain and its sequencer |
| `rtl/packet_controller.sv`, `rtl/packet_ram.sv` | packet assembly and transmission |
| `rtl/multi_gps_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_multi_gps_top.sv` | end-to-end test at a short bit time |
| `tb/tb_multi_gps_top_full.sv` | one full round at default parameters (50 MHz, 9600 bps) |
| `tb/tb_workload_500.sv` | 500 samples on four receivers and on a one-receiver build |
| `tb/nmea_source.sv`, `tb/uart_monitor.sv`, `tb/tb_gps_pkg.sv` | behavioural GPS serial source, serial decoder, sentence helpers |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. It also has a watchdog that counts a failure if the test hangs. To
build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/gps_pkg.sv tb/tb_gps_pkg.sv tb/tb_multi_gps_top.sv \
    --top-module tb_multi_gps_top -Mdir obj_top
./obj_top/Vtb_multi_gps_top
```

Verilator finds the other modules in `rtl/` and `tb/` through `-I`. Block
testbenches override `CLKS_PER_BIT` to a few cycles to keep runs short.
`tb_multi_gps_top_full` simulates 326 ms (16 million cycles) at the real bit rate and
takes about 20 s. The end-to-end test checks the whole packet byte for byte
over seven rounds. Across those rounds it must observe each of the following at
least once, and it counts a failure for any that never happens:

* another sentence type skipped by the parser;
* a receiver masked for too few satellites;
* an average over three receivers;
* a round with no valid receiver;
* sentences arriving while a packet is being sent;
* the sequencer waiting for a missing receiver.
