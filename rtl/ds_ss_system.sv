// ds_ss_system - complete direct sequence spread spectrum link.
//
// The transmitter spreads each bit of the buffered 8-bit information bytes over a 32-chip
// pseudo chaotic word; the spread words go straight to the receiver, which regenerates the
// same chaotic words and despreads them back into bytes. Both chaotic generators are driven
// by the shared fill_sel, din and shift_en inputs, so the user-supplied fill bits act as the
// common key and the two generators stay in step. The spread words are also brought out
// (spread_data, spread_valid) to observe the channel.
//
// Timing: with shift_en held high a byte takes 8 x 32 = 256 clocks to send; data_valid for
// a byte rises on the second clock edge after the one that completes the spreading word
// carrying its last bit. The
// generators clear on reset and produce only zeros until seeded: at least one 1 must be
// loaded through fill_sel/din before data can be told apart. Reset is active high and
// asynchronous.
//
// The structure follows the published system; sharing the generator controls between both
// ends and the direct connection of transmitter to receiver are this implementation's
// reading of it.
module ds_ss_system #(
  parameter int unsigned LFSR_W     = dsss_pkg::LFSR_W,
  parameter logic [LFSR_W-1:0] TAPS = dsss_pkg::LFSR_TAPS,
  parameter int unsigned CHIPS      = dsss_pkg::CHIP_W,
  parameter int unsigned DATA_W     = dsss_pkg::DATA_W,
  parameter int unsigned FIFO_DEPTH = dsss_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid,
  input  logic [DATA_W-1:0] data_in,
  input  logic              fill_sel,
  input  logic              din,
  input  logic              shift_en,
  output logic [DATA_W-1:0] data_out,
  output logic              data_valid,
  output logic [CHIPS-1:0]  spread_data,
  output logic              spread_valid,
  output logic              buf_rd,
  output logic              buf_full,
  output logic              overflow
);

  logic tx_chip, rx_bit, rx_exact;

  ds_transmitter #(
    .LFSR_W(LFSR_W), .TAPS(TAPS), .CHIPS(CHIPS), .DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_tx (
    .clk, .rst, .valid, .data_in, .fill_sel, .din, .shift_en,
    .spread_out(spread_data), .spread_valid, .rd(buf_rd), .buf_full, .overflow, .chip(tx_chip)
  );

  ds_receiver #(
    .LFSR_W(LFSR_W), .TAPS(TAPS), .CHIPS(CHIPS), .DATA_W(DATA_W)
  ) u_rx (
    .clk, .rst, .fill_sel, .din, .shift_en,
    .rx_data(spread_data), .rx_valid(spread_valid),
    .data_out, .data_valid, .rx_bit, .rx_exact
  );

endmodule
