// ds_receiver - direct sequence spread spectrum receiver.
//
// The receiver's own chaotic generator (ualfsr), driven by the same fill_sel, din and
// shift_en as the transmitter's, reproduces the transmitter's chips; serial to parallel
// converter (1) (s2p) gathers them into CHIPS-bit reference words. For every received word
// (rx_valid high) the bit correlator XORs it with the current reference word and decides one
// information bit, and serial to parallel converter (2) gathers DATA_W decided bits,
// first bit in the MSB, into data_out with a one-cycle data_valid pulse.
//
// Timing: the reference word is held from the edge that completes it until the next one,
// i.e. for at least CHIPS clocks, so a received word must arrive less than CHIPS clocks after
// the matching local word completes (the transmitter delivers it one clock later). The
// receiver assumes its first received word after reset starts a byte. data_out changes one
// clock after the edge that samples the byte's last received word. Reset is active high and
// asynchronous.
//
// The generator, the two converters, the XOR correlator and the 32-bit and 8-bit widths are
// published; the decision rule (see bit_correlator), the valid strobes and the sharing of
// the generator controls with the transmitter are this implementation's choices.
module ds_receiver #(
  parameter int unsigned LFSR_W     = dsss_pkg::LFSR_W,
  parameter logic [LFSR_W-1:0] TAPS = dsss_pkg::LFSR_TAPS,
  parameter int unsigned CHIPS      = dsss_pkg::CHIP_W,
  parameter int unsigned DATA_W     = dsss_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              fill_sel,
  input  logic              din,
  input  logic              shift_en,
  input  logic [CHIPS-1:0]  rx_data,     // received spread word
  input  logic              rx_valid,    // rx_data carries one information bit
  output logic [DATA_W-1:0] data_out,    // recovered byte
  output logic              data_valid,  // data_out was updated
  output logic              rx_bit,      // decision for the word on rx_data
  output logic              rx_exact     // rx_data matched a hypothesis chip for chip
);

  logic              chip;
  logic [LFSR_W-1:0] lfsr_state;
  logic [CHIPS-1:0]  ref_word;

  ualfsr #(.WIDTH(LFSR_W), .TAPS(TAPS)) u_gen (
    .clk, .rst, .fill_sel, .din, .shift_en,
    .seq_out(chip), .state(lfsr_state)
  );

  s2p #(.WIDTH(CHIPS)) u_ref (
    .clk, .rst,
    .in_valid(shift_en), .ser_in(chip),
    .par_out(ref_word), .par_valid()
  );

  bit_correlator #(.WIDTH(CHIPS)) u_corr (
    .rx_word(rx_data), .ref_word, .bit_out(rx_bit), .exact(rx_exact)
  );

  s2p #(.WIDTH(DATA_W)) u_bytes (
    .clk, .rst,
    .in_valid(rx_valid), .ser_in(rx_bit),
    .par_out(data_out), .par_valid(data_valid)
  );

endmodule
