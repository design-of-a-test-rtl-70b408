// Shared types and constants of the Stimuli Measurement Unit.
//
// The serial protocol between the PC and the unit uses 4-field frames framed
// by STX (02h) and ETX (03h) and closed by a checksum byte that is the least
// significant byte of the sum of all preceding fields.  Command IDs 11h, 12h
// and 13h request a data frame, the end of the data transfer and the
// parameter frame.  The parameter byte 32h (decimal 50) reports a 50 MHz
// clock.  All of these codes are the protocol's; the names are this design's.
//
// A sample is 40 bits: the 8-bit GPIO byte read from the test device in the
// upper byte, and the 32-bit clock tick count at which it was taken below it
// (the split into 8 + 32 bits is this design's reading of the 40-bit word).
package smu_pkg;

  localparam logic [7:0] STX = 8'h02;
  localparam logic [7:0] ETX = 8'h03;
  localparam logic [7:0] PAR_50MHZ = 8'h32;

  typedef enum logic [7:0] {
    CMD_DATA_SEND = 8'h11,   // request one data frame
    CMD_DATA_END  = 8'h12,   // request end of data send
    CMD_PARAM     = 8'h13    // request the parameter frame
  } cmd_e;

  localparam int unsigned IO_W    = 8;
  localparam int unsigned TICK_W  = 32;
  localparam int unsigned SAMPLE_W = IO_W + TICK_W;   // 40
  localparam int unsigned SAMPLE_BYTES = SAMPLE_W / 8; // 5

  typedef struct packed {
    logic [IO_W-1:0]   io;     // GPIO byte: bit 0 = GPIO4 (task), bit 1 = GPIO5 (ISR)
    logic [TICK_W-1:0] ticks;  // clock ticks since reset
  } sample_t;

  // Bit period of the UART in clock cycles, rounded to the nearest integer.
  function automatic int unsigned clks_per_bit(longint unsigned clk_hz,
                                               longint unsigned baud);
    return int'((clk_hz + baud / 2) / baud);
  endfunction

endpackage
