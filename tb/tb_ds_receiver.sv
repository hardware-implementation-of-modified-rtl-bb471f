// tb_ds_receiver - self-checking testbench for the despreading receiver.
//
// The testbench plays the transmitter: it runs its own model of the chaotic chip stream
// (17-bit register, right shift, feedback r[0]^r[4]^r[5]^r[9] or the fill bit) under the same
// fill_sel, din and shift_en as the receiver, gathers 32-chip words (first chip in the MSB)
// and, for each bit of a random byte taken MSB first, presents the word (bit 1) or zero
// (bit 0) on rx_data for one cycle, a random 1 to 20 clocks after the word completed. Some
// words get up to three flipped chips. Each recovered byte must equal the byte sent and
// data_valid must pulse in the cycle after the byte's last word was presented. Words
// completed while no byte is being sent are skipped, and shift_en is stalled at random.
module tb_ds_receiver;
  localparam int LW = 17, CH = 32, DW = 8;

  logic          clk = 1'b0;
  logic          rst;
  logic          fill_sel, din, shift_en;
  logic [CH-1:0] rx_data;
  logic          rx_valid;
  logic [DW-1:0] data_out;
  logic          data_valid, rx_bit, rx_exact;
  int            checks = 0, failures = 0;

  ds_receiver dut (.*);

  always #5 clk = ~clk;

  initial begin
    #6000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: data_out=%h", what, $time, data_out);
    end
  endtask

  logic [LW-1:0] r;
  logic [CH-1:0] acc;
  int            nchip;

  // transmit side model
  logic [DW-1:0] cur_byte;
  int            bit_idx;          // -1: no byte in progress
  logic [DW-1:0] sent_q[$];
  logic [CH-1:0] pend_word;
  int            pend_delay;       // clocks until pend_word is presented, -1: none
  logic          expect_valid;
  int            n_bytes, n_err_words, n_skipped, n_stall;

  task automatic tick(input logic f, input logic fd, input logic en, input logic want_bytes);
    logic word_done;
    logic [CH-1:0] w;
    fill_sel = f; din = fd; shift_en = en;
    // present a pending word
    rx_valid = 1'b0; rx_data = '0;
    expect_valid = 1'b0;
    if (pend_delay == 0) begin
      rx_valid = 1'b1; rx_data = pend_word;
      pend_delay = -1;
    end else if (pend_delay > 0) pend_delay--;
    if (rx_valid && bit_idx == -1) expect_valid = 1'b1;  // last bit of a byte presented
    if (!en) n_stall++;
    @(posedge clk);
    word_done = 1'b0;
    if (en) begin
      acc = {acc[CH-2:0], r[0]};
      r   = {(f ? fd : (r[0] ^ r[4] ^ r[5] ^ r[9])), r[LW-1:1]};
      nchip++;
      if (nchip == CH) begin nchip = 0; word_done = 1'b1; end
    end
    #1;
    check(data_valid == expect_valid, "data_valid timing");
    if (expect_valid) begin
      check(sent_q.size() > 0 && data_out == sent_q[0], "recovered byte");
      if (sent_q.size() > 0) void'(sent_q.pop_front());
      n_bytes++;
    end
    if (word_done) begin
      if (bit_idx == -1 && want_bytes) begin
        cur_byte = DW'($urandom);
        sent_q.push_back(cur_byte);
        bit_idx = DW - 1;
      end
      if (bit_idx >= 0) begin
        w = cur_byte[bit_idx] ? acc : '0;
        if ($urandom_range(0, 3) == 0) begin
          for (int k = 0; k < 3; k++) w[$urandom_range(0, CH - 1)] ^= 1'b1;
          n_err_words++;
        end
        pend_word  = w;
        pend_delay = $urandom_range(0, 19);
        bit_idx--;
      end else n_skipped++;
    end
  endtask

  initial begin
    r = '0; acc = '0; nchip = 0; bit_idx = -1; pend_delay = -1;
    n_bytes = 0; n_err_words = 0; n_skipped = 0; n_stall = 0;
    fill_sel = 0; din = 0; shift_en = 0; rx_data = '0; rx_valid = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!data_valid && data_out == '0, "reset");
    // seed with a key that gives a well-balanced sequence
    for (int i = 0; i < LW; i++) tick(1'b1, (32'h15A6D >> i) & 1, 1'b1, 1'b0);
    repeat (80) tick(1'b0, 1'b0, 1'b1, 1'b0);
    for (int i = 0; i < 12000; i++) tick(1'b0, 1'b0, ($urandom_range(0, 15) != 0), (i < 11000));
    repeat (300) tick(1'b0, 1'b0, 1'b1, 1'b0);
    check(sent_q.size() == 0, "all bytes recovered");
    check(n_bytes > 30 && n_err_words > 0 && n_skipped > 0 && n_stall > 0, "mechanisms exercised");
    $display("bytes=%0d error_words=%0d skipped_words=%0d stalls=%0d", n_bytes, n_err_words, n_skipped, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
