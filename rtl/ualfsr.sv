// ualfsr - universal asynchronous linear feedback shift register (pseudo chaotic chip source).
//
// A WIDTH-bit register shifts right by one place on every clock edge with shift_en high. The
// bit entering the MSB comes from a 2:1 multiplexer: the user data bit din when fill_sel is 1,
// otherwise the parity (XOR) of the register bits selected by TAPS. The bit leaving the LSB
// is the chip output seq_out, so seq_out always shows the current LSB. Because the feedback
// taps are a parameter and the user can inject any bit stream through din, one circuit serves
// any feedback polynomial and any user key; that is what "universal" refers to.
//
// Reset (rst, active high, asynchronous) clears every bit, so seq_out is 0 after reset. With
// all bits zero the parity feedback is also zero: the register must be seeded through
// fill_sel/din before it produces a non-zero sequence. Priority follows the published
// flow: reset first, then shift enable; fill_sel only steers the multiplexer.
//
// Width 17, taps {0,4,5,9}, right shift, MSB insertion, LSB output and clear-on-reset follow
// the published design. The asynchronous reset is this implementation's reading of the
// generator's name.
module ualfsr #(
  parameter int unsigned            WIDTH = dsss_pkg::LFSR_W,
  parameter logic [WIDTH-1:0]       TAPS  = dsss_pkg::LFSR_TAPS
) (
  input  logic             clk,
  input  logic             rst,       // active-high asynchronous clear
  input  logic             fill_sel,  // 1: load din into the MSB, 0: load tap parity
  input  logic             din,       // user-supplied fill bit
  input  logic             shift_en,  // advance one chip
  output logic             seq_out,   // chip output: LSB of the register
  output logic [WIDTH-1:0] state      // register contents, for observation
);

  logic [WIDTH-1:0] sr;
  logic             parity;
  logic             msb_in;

  // Parity generator over the tap points.
  assign parity = ^(sr & TAPS);

  // 2:1 multiplexer in front of the MSB.
  assign msb_in = fill_sel ? din : parity;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)           sr <= '0;
    else if (shift_en) sr <= {msb_in, sr[WIDTH-1:1]};
  end

  assign seq_out = sr[0];
  assign state   = sr;

endmodule
