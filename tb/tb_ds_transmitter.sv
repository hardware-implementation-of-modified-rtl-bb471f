// tb_ds_transmitter - self-checking testbench for the spreading transmitter.
//
// The testbench runs its own model of the chaotic chip stream (17-bit register, right
// shift, feedback r[0]^r[4]^r[5]^r[9] or the fill bit) and groups the chips into 32-chip
// words, first chip in the MSB, remembering the clock at which each word completed. Every
// sent word (spread_valid) must come one clock edge after the edge completing a chip word and must
// equal that chip word (bit 1) or zero (bit 0); the bits so recovered must give back the
// accepted bytes in order, MSB first. Bytes written while the buffer is full must be
// dropped and flagged by overflow, and rd must pulse once per byte sent. The run seeds the generator, sends bytes with random
// shift_en stalls, lets the link go idle (no words may be sent) and overfills the buffer.
module tb_ds_transmitter;
  localparam int LW = 17, CH = 32, DW = 8;

  logic          clk = 1'b0;
  logic          rst;
  logic          valid;
  logic [DW-1:0] data_in;
  logic          fill_sel, din, shift_en;
  logic [CH-1:0] spread_out;
  logic          spread_valid, rd, buf_full, overflow, chip;
  int            checks = 0, failures = 0;

  ds_transmitter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // chip stream model
  logic [LW-1:0] r;
  logic [CH-1:0] acc;
  int            nchip;
  longint        cyc;
  logic [CH-1:0] word_at[longint];   // completed words keyed by completion cycle

  // expected information
  logic [DW-1:0] sent_q[$];
  logic [DW-1:0] got_byte;
  int            got_bits, n_bytes, n_ovf, n_stall, n_idle_words, n_rd;
  logic          ovf_exp;

  // one clock: apply controls, step the model, check outputs
  task automatic tick(input logic v, input logic [DW-1:0] d, input logic f, input logic fd,
                      input logic en);
    valid = v; data_in = d; fill_sel = f; din = fd; shift_en = en;
    ovf_exp = v && buf_full;
    if (v && !buf_full) sent_q.push_back(d);
    if (!en) n_stall++;
    @(posedge clk);
    cyc++;
    if (en) begin
      acc = {acc[CH-2:0], r[0]};
      r   = {(f ? fd : (r[0] ^ r[4] ^ r[5] ^ r[9])), r[LW-1:1]};
      nchip++;
      if (nchip == CH) begin
        nchip = 0;
        word_at[cyc] = acc;
      end
    end
    #1;
    check(chip == r[0], "chip output");
    if (rd) n_rd++;
    check(overflow == ovf_exp, "overflow flag");
    if (ovf_exp) n_ovf++;
    if (word_at.exists(cyc - 1) && !spread_valid) n_idle_words++;
    if (spread_valid) begin
      logic [CH-1:0] w;
      logic          b;
      check(word_at.exists(cyc - 1), "word sent one clock after completion");
      w = word_at.exists(cyc - 1) ? word_at[cyc - 1] : '0;
      check(spread_out == w || spread_out == '0, "spread word is chip word or zero");
      b = (spread_out == w);
      got_byte = {got_byte[DW-2:0], b};
      got_bits++;
      if (got_bits == DW) begin
        got_bits = 0;
        check(sent_q.size() > 0 && got_byte == sent_q[0], "byte order and value");
        if (sent_q.size() > 0) void'(sent_q.pop_front());
        n_bytes++;
      end
    end
  endtask

  initial begin
    r = '0; acc = '0; nchip = 0; cyc = 0;
    got_bits = 0; got_byte = '0; n_bytes = 0; n_rd = 0; n_ovf = 0; n_stall = 0; n_idle_words = 0;
    valid = 0; data_in = '0; fill_sel = 0; din = 0; shift_en = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(spread_out == '0 && !spread_valid && !buf_full, "reset");
    // seed the generator with a 17-bit key
    for (int i = 0; i < LW; i++) tick(1'b0, '0, 1'b1, (32'h1A2B5 >> i) & 1, 1'b1);
    // idle words: nothing to send
    repeat (100) tick(1'b0, '0, 1'b0, 1'b0, 1'b1);
    // the example byte, then random bytes with random stalls
    tick(1'b1, 8'b1001_1100, 1'b0, 1'b0, 1'b1);
    for (int i = 0; i < 3000; i++)
      tick(($urandom_range(0, 299) == 0), DW'($urandom), 1'b0, 1'b0, ($urandom_range(0, 9) != 0));
    // burst that overfills the buffer
    for (int i = 0; i < 20; i++) tick(1'b1, DW'($urandom), 1'b0, 1'b0, 1'b1);
    // drain
    for (int i = 0; i < 20 * DW * CH + 200; i++) tick(1'b0, '0, 1'b0, 1'b0, 1'b1);
    check(sent_q.size() == 0 && got_bits == 0, "all accepted bytes sent");
    check(n_rd == n_bytes, "one rd per byte sent");
    check(n_ovf > 0 && n_stall > 0 && n_idle_words > 0 && n_bytes > 20, "mechanisms exercised");
    $display("bytes=%0d overflow=%0d stalls=%0d idle_words=%0d", n_bytes, n_ovf, n_stall, n_idle_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
