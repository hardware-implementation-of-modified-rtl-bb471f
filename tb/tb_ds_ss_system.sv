// tb_ds_ss_system - end-to-end testbench of the spread spectrum link at default sizes.
//
// The testbench keeps an independent model of the chaotic chip stream (17-bit register,
// right shift, feedback r[0]^r[4]^r[5]^r[9] or the fill bit) and of its 32-chip words, and a
// queue of the bytes the buffer accepted. It checks that every word on the channel equals the
// chip word completed on the previous clock edge or zero, that every recovered byte equals the
// next accepted byte, that data_valid rises on the second edge after the word carrying the
// byte's last bit completed, and that a byte written into a full buffer raises overflow.
//
// Phases: (1) the generator left at its reset value of zero while the example byte
// 1001_1100 is sent: every channel word is zero and the byte comes out as 0000_0000;
// (2) reset, a 17-bit key loaded through fill_sel/din, then the same byte, recovered intact;
// (3) random bytes with random shift_en stalls, idle stretches, a burst that overfills the
// buffer and a new key loaded while data is flowing. Each of these mechanisms is counted and
// a failure is counted for any that never happened.
module tb_ds_ss_system;
  localparam int LW = 17, CH = 32, DW = 8, DEPTH = 16;

  logic          clk = 1'b0;
  logic          rst;
  logic          valid;
  logic [DW-1:0] data_in;
  logic          fill_sel, din, shift_en;
  logic [DW-1:0] data_out;
  logic          data_valid;
  logic [CH-1:0] spread_data;
  logic          spread_valid, buf_rd, buf_full, overflow;
  int            checks = 0, failures = 0;

  ds_ss_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
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
  longint        cyc, last_bit_cyc;
  logic [CH-1:0] word_at[longint];
  logic [DW-1:0] acc_q[$];
  logic [DW-1:0] exp_q[$];       // bytes expected at the receiver output
  int            bits_in_byte;
  logic          prev_sent;
  logic          ovf_exp;
  bit            zero_seq;       // phase 1: the expected byte is all zeros
  int            n_rd, n_bytes, n_fill, n_stall, n_ovf, n_idle, n_b2b, n_zero_bytes, n_rekey;

  task automatic tick(input logic v, input logic [DW-1:0] d, input logic f, input logic fd,
                      input logic en);
    valid = v; data_in = d; fill_sel = f; din = fd; shift_en = en;
    ovf_exp = v && buf_full;
    if (v && !buf_full) exp_q.push_back(zero_seq ? '0 : d);
    if (f && en) n_fill++;
    if (!en) n_stall++;
    @(posedge clk);
    cyc++;
    if (en) begin
      acc = {acc[CH-2:0], r[0]};
      r   = {(f ? fd : (r[0] ^ r[4] ^ r[5] ^ r[9])), r[LW-1:1]};
      nchip++;
      if (nchip == CH) begin nchip = 0; word_at[cyc] = acc; end
    end
    #1;
    check(overflow == ovf_exp, "overflow flag");
    if (buf_rd) n_rd++;
    if (ovf_exp) n_ovf++;
    if (word_at.exists(cyc - 1)) begin
      if (spread_valid) begin
        check(spread_data == word_at[cyc - 1] || spread_data == '0, "channel word");
        if (bits_in_byte == 0 && prev_sent) n_b2b++;
        bits_in_byte = (bits_in_byte + 1) % DW;
        if (bits_in_byte == 0) last_bit_cyc = cyc - 1;
      end else begin
        n_idle++;
      end
      prev_sent = spread_valid;
    end else begin
      check(!spread_valid, "no word without a completed chip word");
    end
    check(data_valid == (last_bit_cyc == cyc - 2), "data_valid timing");
    if (data_valid) begin
      check(exp_q.size() > 0 && data_out == exp_q[0], "recovered byte");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      if (data_out == '0 && zero_seq) n_zero_bytes++;
      n_bytes++;
    end
  endtask

  task automatic do_reset();
    valid = 0; data_in = '0; fill_sel = 0; din = 0; shift_en = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    r = '0; acc = '0; nchip = 0; bits_in_byte = 0; prev_sent = 0; last_bit_cyc = -10;
    word_at.delete();
    check(!data_valid && !spread_valid && data_out == '0 && spread_data == '0, "reset");
  endtask

  task automatic load_key(input logic [LW-1:0] key);
    for (int i = 0; i < LW; i++) tick(1'b0, '0, 1'b1, key[i], 1'b1);
  endtask

  initial begin
    cyc = 0; n_rd = 0; n_bytes = 0; n_fill = 0; n_stall = 0; n_ovf = 0; n_idle = 0; n_b2b = 0;
    n_zero_bytes = 0; n_rekey = 0;

    // (1) unseeded generator: zero chips, the byte cannot be carried
    zero_seq = 1;
    do_reset();
    tick(1'b1, 8'b1001_1100, 1'b0, 1'b0, 1'b1);
    repeat (DW * CH + 40) tick(1'b0, '0, 1'b0, 1'b0, 1'b1);
    check(exp_q.size() == 0 && n_zero_bytes == 1, "unseeded link gives zero byte");

    // (2) seeded generator: the example byte is recovered
    zero_seq = 0;
    do_reset();
    load_key(17'h15A6D);
    tick(1'b1, 8'b1001_1100, 1'b0, 1'b0, 1'b1);
    repeat (DW * CH + 40) tick(1'b0, '0, 1'b0, 1'b0, 1'b1);
    check(exp_q.size() == 0 && n_bytes == 2, "example byte recovered");

    // (3) random traffic, stalls, idle, overflow, re-keying
    for (int i = 0; i < 30000; i++) begin
      if (i == 15000) begin
        load_key(17'h0B3C7);
        n_rekey++;
      end
      tick(($urandom_range(0, 199) == 0), DW'($urandom), 1'b0, 1'b0,
           ($urandom_range(0, 11) != 0));
      if (i == 8000)
        for (int k = 0; k < DEPTH + 6; k++) tick(1'b1, DW'($urandom), 1'b0, 1'b0, 1'b1);
    end
    repeat ((DEPTH + 2) * DW * CH * 2) tick(1'b0, '0, 1'b0, 1'b0, 1'b1);
    check(exp_q.size() == 0, "all accepted bytes recovered");
    check(n_rd == n_bytes, "one buffer read per byte");

    $display("bytes=%0d fill_cycles=%0d stalls=%0d overflows=%0d idle_words=%0d back_to_back=%0d zero_bytes=%0d rekeys=%0d",
             n_bytes, n_fill, n_stall, n_ovf, n_idle, n_b2b, n_zero_bytes, n_rekey);
    check(n_fill > 0,       "key fill exercised");
    check(n_stall > 0,      "shift_en stall exercised");
    check(n_ovf > 0,        "buffer overflow exercised");
    check(n_idle > 0,       "idle words exercised");
    check(n_b2b > 0,        "back-to-back bytes exercised");
    check(n_rekey > 0,      "re-keying during traffic exercised");
    check(n_zero_bytes > 0, "zero sequence case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
