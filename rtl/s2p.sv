// s2p - serial to parallel converter.
//
// Each clock edge with in_valid high shifts ser_in into a WIDTH-bit register. The first bit
// received ends up in the most significant position, so a word reads in arrival order from
// MSB to LSB. When WIDTH bits have been gathered the whole word is copied to par_out, which
// then holds until the next word is complete, and par_valid pulses high for one cycle
// together with the new par_out. Reset (active high, asynchronous) clears the count and the
// output word.
//
// Three instances are used: one gathers transmit chips into 32-bit words, one gathers the
// receiver's local chips into 32-bit reference words, and one gathers decided bits into
// 8-bit bytes. Their widths are published; bit order and the held output with a valid
// strobe are this implementation's choices.
module s2p #(
  parameter int unsigned WIDTH = dsss_pkg::CHIP_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic             ser_in,
  output logic [WIDTH-1:0] par_out,
  output logic             par_valid
);

  localparam int unsigned CW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] sr;
  logic [CW-1:0]    cnt;
  logic [WIDTH-1:0] word_next;

  assign word_next = {sr[WIDTH-2:0], ser_in};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sr        <= '0;
      cnt       <= '0;
      par_out   <= '0;
      par_valid <= 1'b0;
    end else begin
      par_valid <= 1'b0;
      if (in_valid) begin
        sr <= word_next;
        if (cnt == CW'(WIDTH - 1)) begin
          cnt       <= '0;
          par_out   <= word_next;
          par_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
