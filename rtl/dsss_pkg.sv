// dsss_pkg - constants shared by the DS-SS transmitter, receiver and their parts.
//
// The chaotic sequence generator is a 17-bit right-shifting register whose feedback is the
// parity of bits 0, 4, 5 and 9. Each information bit is spread over one 32-chip word, and
// information data is carried in 8-bit bytes. These four numbers are the design's own
// published figures; the buffer depth is a choice of this implementation.
package dsss_pkg;

  // Sequence generator register width and feedback tap mask (bits 0, 4, 5, 9).
  localparam int unsigned               LFSR_W    = 17;
  localparam logic [LFSR_W-1:0]         LFSR_TAPS = 17'b0_0000_0010_0011_0001;

  // Chips per information bit: width of the spread word.
  localparam int unsigned               CHIP_W    = 32;

  // Information data width.
  localparam int unsigned               DATA_W    = 8;

  // Transmit buffer depth (not given by the published design).
  localparam int unsigned               FIFO_DEPTH = 16;

endpackage
