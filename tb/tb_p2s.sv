// tb_p2s - self-checking testbench for the parallel to serial converter.
//
// A testbench queue stands in for the buffer (empty flag, head word, pop on rd). Bytes are
// pushed at random times and next is pulsed at random; every bit the converter presents
// while busy and consumed by next is compared with the expected stream, the pushed bytes
// taken most significant bit first. Also checked: rd only with data available, busy
// staying high across back-to-back bytes, and busy dropping once the buffer runs dry.
module tb_p2s;
  localparam int W = 8;

  logic         clk = 1'b0;
  logic         rst;
  logic         buf_empty;
  logic [W-1:0] buf_data;
  logic         rd, next, ser_out, busy;
  logic [W-1:0] q[$];
  logic         exp_bits[$];
  int           checks = 0, failures = 0;
  int           n_b2b = 0, n_idle = 0, sent = 0;
  logic         was_last, took;

  p2s #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  // The queue is mirrored into the buffer signals after every change.
  task automatic upd();
    buf_empty = (q.size() == 0);
    buf_data  = buf_empty ? '0 : q[0];
  endtask

  initial begin
    #2000000;
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

  int bitpos;

  initial begin
    next = 0;
    bitpos = 0;
    upd();
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!busy && !rd, "idle after reset");
    for (int i = 0; i < 4000; i++) begin
      // stimulus before the edge
      next = busy && ($urandom_range(0, 2) == 0);
      if (i < 3000 && $urandom_range(0, 40) == 0 && q.size() < 4) begin
        logic [W-1:0] b;
        b = W'($urandom);
        q.push_back(b);
        for (int k = W - 1; k >= 0; k--) exp_bits.push_back(b[k]);
      end
      upd();
      #1;
      if (rd) check(!buf_empty, "rd only with data");
      was_last = next && (bitpos == W - 1);
      if (next) begin
        check(exp_bits.size() > 0 && ser_out == exp_bits[0], "bit value");
        if (exp_bits.size() > 0) void'(exp_bits.pop_front());
        sent++;
        bitpos = (bitpos + 1) % W;
      end
      took = rd;
      @(posedge clk);
      #1;
      if (took) void'(q.pop_front());
      upd();
      if (was_last) begin
        if (busy) n_b2b++;
        else      n_idle++;
      end
    end
    next = 0;
    check(exp_bits.size() == 0 && !busy, "all bits sent");
    check(n_b2b > 0 && n_idle > 0, "back-to-back and idle both seen");
    $display("bits=%0d back_to_back=%0d idle=%0d", sent, n_b2b, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
