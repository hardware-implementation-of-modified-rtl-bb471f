// sync_fifo - the transmitter's input buffer for information bytes.
//
// A single-clock first-in first-out store of DEPTH words of WIDTH bits, held in a register
// array addressed by wrapping read and write pointers with one extra wrap bit each to tell
// full from empty. A word is written on a clock edge with wr_en high and the buffer not full;
// a write while full is dropped and reported by a one-cycle overflow pulse. rd_en high with
// the buffer not empty removes the head word; rd_data always shows the head word
// (first-word fall-through), so the reader takes it in the same cycle it raises rd_en.
// Reset (active high, asynchronous) empties the buffer.
//
// That the transmitter buffers incoming bytes while valid is high, and releases one when
// the converter raises rd, is published; depth, fall-through reading and dropping writes
// when full are choices of this implementation.
module sync_fifo #(
  parameter int unsigned WIDTH = dsss_pkg::DATA_W,
  parameter int unsigned DEPTH = dsss_pkg::FIFO_DEPTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             overflow   // a write was dropped because the buffer was full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty = (wr_ptr == rd_ptr);
  assign full  = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  // Pointers advance modulo DEPTH in the low bits and toggle the wrap bit on wrap-around.
  function automatic logic [AW:0] ptr_inc(input logic [AW:0] p);
    if (p[AW-1:0] == AW'(DEPTH - 1)) return {~p[AW], {AW{1'b0}}};
    else                             return p + 1'b1;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wr_ptr <= ptr_inc(wr_ptr);
      if (do_rd) rd_ptr <= ptr_inc(rd_ptr);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  assign rd_data = mem[rd_ptr[AW-1:0]];

  // The reader must not pop an empty buffer.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty);

endmodule
