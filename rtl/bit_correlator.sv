// bit_correlator - despreading decision for one received word.
//
// The received WIDTH-bit word is XORed chip by chip with the local chaotic word. The
// transmitter sends either the chaotic word itself (bit 1) or all zeros (bit 0), so the
// number of ones in the XOR is the distance from the "1" hypothesis and the number of ones in
// the received word is the distance from the "0" hypothesis. bit_out is 1 when the received
// word is strictly nearer the chaotic word than zero; with no chip errors that makes the XOR
// all zeros for a 1 and equal to the chaotic word for a 0, and the decision stays correct
// while fewer chips are corrupted than half the number of ones in the chaotic word. A tie,
// which includes an all-zero chaotic word, decides 0. The block is purely combinational.
//
// The chip-wise XOR of received and local words reduced to one bit is published; the
// nearest-hypothesis reduction by counting ones is this implementation's choice.
module bit_correlator #(
  parameter int unsigned WIDTH = dsss_pkg::CHIP_W
) (
  input  logic [WIDTH-1:0] rx_word,   // received spread word
  input  logic [WIDTH-1:0] ref_word,  // local chaotic word
  output logic             bit_out,   // decided information bit
  output logic             exact      // received word equals one hypothesis exactly
);

  localparam int unsigned NW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] x;
  logic [NW-1:0]    dist_one, dist_zero;

  assign x = rx_word ^ ref_word;

  always_comb begin
    dist_one  = '0;
    dist_zero = '0;
    for (int i = 0; i < WIDTH; i++) begin
      dist_one  = dist_one  + NW'(x[i]);
      dist_zero = dist_zero + NW'(rx_word[i]);
    end
  end

  assign bit_out = (dist_one < dist_zero);
  assign exact   = (x == '0) || (rx_word == '0);

endmodule
