// p2s - parallel to serial converter between the transmit buffer and the spreading mux.
//
// When the converter holds no byte, or is giving up the last bit of its byte, and the buffer
// is not empty, it raises rd for one cycle and loads the buffer's head word on that clock
// edge. It then presents the word one bit at a time on ser_out, most significant bit first,
// with busy high. Each pulse on next (one per completed spreading word) moves to the following
// bit; the pulse that consumes the last bit either loads the next byte at once or, with the
// buffer empty, drops busy. Reset (active high, asynchronous) empties the converter.
//
// The rd handshake with the buffer and the role of ser_out as the select of the output mux
// are published. Bit order (MSB first) and back-to-back loading are this implementation's
// choices.
module p2s #(
  parameter int unsigned WIDTH = dsss_pkg::DATA_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             buf_empty,  // buffer holds no word
  input  logic [WIDTH-1:0] buf_data,   // buffer head word
  output logic             rd,         // take buf_data on this clock edge
  input  logic             next,       // current bit has been used, advance
  output logic             ser_out,    // current information bit
  output logic             busy        // ser_out holds a valid bit
);

  localparam int unsigned CW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] sr;
  logic [CW-1:0]    cnt;
  logic             last;       // ser_out is the final bit of the byte
  logic             done;

  assign last = busy && (cnt == CW'(WIDTH - 1));
  assign done = busy && next && last;
  assign rd   = !buf_empty && (!busy || done);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sr   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else if (rd) begin
      sr   <= buf_data;
      cnt  <= '0;
      busy <= 1'b1;
    end else if (done) begin
      busy <= 1'b0;
    end else if (busy && next) begin
      sr   <= {sr[WIDTH-2:0], 1'b0};
      cnt  <= cnt + 1'b1;
    end
  end

  assign ser_out = sr[WIDTH-1];

endmodule
