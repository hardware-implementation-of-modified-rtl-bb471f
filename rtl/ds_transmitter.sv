// ds_transmitter - direct sequence spread spectrum transmitter.
//
// Information bytes offered with valid high are written into the buffer (sync_fifo). The
// parallel to serial converter (p2s) takes them one at a time with rd and presents one
// information bit at a time. In parallel the chaotic generator (ualfsr) emits one chip per
// clock with shift_en high, and the serial to parallel converter (s2p) gathers CHIPS chips
// into a spreading word. Each time a word is complete, the output mux sends that word on
// spread_out if the current information bit is 1 and all zeros if it is 0, which is the
// product of the bit with the chaotic sequence, and the converter moves to its next bit.
//
// Timing: a chip word completes after CHIPS clocks with shift_en high; spread_out and
// spread_valid are registered and change on the clock edge after the one that shifts in
// the word's last chip. spread_valid is high for one cycle per information bit actually sent;
// a word completed while no byte is waiting is not sent (spread_valid low, spread_out zero).
// A byte therefore occupies DATA_W consecutive sent words. Holding shift_en low stalls the
// generator and so the whole transmitter. Reset is active high and asynchronous.
//
// The blocks, their order, the 8-bit input, the 32-bit output, the rd output and the mux
// rule are published; the output register, the valid strobe and skipping idle words are this
// implementation's choices.
module ds_transmitter #(
  parameter int unsigned LFSR_W     = dsss_pkg::LFSR_W,
  parameter logic [LFSR_W-1:0] TAPS = dsss_pkg::LFSR_TAPS,
  parameter int unsigned CHIPS      = dsss_pkg::CHIP_W,
  parameter int unsigned DATA_W     = dsss_pkg::DATA_W,
  parameter int unsigned FIFO_DEPTH = dsss_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid,         // data_in holds a byte to send
  input  logic [DATA_W-1:0] data_in,
  input  logic              fill_sel,      // generator: 1 = load din, 0 = tap feedback
  input  logic              din,           // generator fill bit
  input  logic              shift_en,      // generator advance
  output logic [CHIPS-1:0]  spread_out,    // spread word
  output logic              spread_valid,  // spread_out carries one information bit
  output logic              rd,            // converter takes a byte from the buffer
  output logic              buf_full,      // buffer cannot take another byte
  output logic              overflow,      // a byte was dropped because the buffer was full
  output logic              chip           // current chip of the generator
);

  logic [DATA_W-1:0] buf_data;
  logic              buf_empty;
  logic              bit_cur, bit_busy;
  logic [CHIPS-1:0]  chip_word;
  logic              word_done;
  logic [LFSR_W-1:0] lfsr_state;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk, .rst,
    .wr_en(valid), .wr_data(data_in),
    .rd_en(rd), .rd_data(buf_data),
    .empty(buf_empty), .full(buf_full), .overflow
  );

  p2s #(.WIDTH(DATA_W)) u_p2s (
    .clk, .rst,
    .buf_empty, .buf_data, .rd,
    .next(word_done), .ser_out(bit_cur), .busy(bit_busy)
  );

  ualfsr #(.WIDTH(LFSR_W), .TAPS(TAPS)) u_gen (
    .clk, .rst, .fill_sel, .din, .shift_en,
    .seq_out(chip), .state(lfsr_state)
  );

  s2p #(.WIDTH(CHIPS)) u_chips (
    .clk, .rst,
    .in_valid(shift_en), .ser_in(chip),
    .par_out(chip_word), .par_valid(word_done)
  );

  // Output mux: the information bit selects the chaotic word or zero.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      spread_out   <= '0;
      spread_valid <= 1'b0;
    end else begin
      spread_valid <= word_done && bit_busy;
      if (word_done) spread_out <= (bit_busy && bit_cur) ? chip_word : '0;
    end
  end

endmodule
