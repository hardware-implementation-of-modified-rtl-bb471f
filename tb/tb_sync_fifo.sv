// tb_sync_fifo - self-checking testbench for the transmit buffer.
//
// A queue in the testbench models the buffer. Random writes and reads (reads only when the
// design reports not empty) are applied for many cycles; every cycle the head word, empty,
// full and the overflow pulse are compared with the queue. The buffer is also filled to
// DEPTH to check full and that an extra write is dropped and flagged.
module tb_sync_fifo;
  localparam int W = 8;
  localparam int D = 16;

  logic         clk = 1'b0;
  logic         rst;
  logic         wr_en, rd_en;
  logic [W-1:0] wr_data, rd_data;
  logic         empty, full, overflow;
  logic [W-1:0] q[$];
  logic         exp_ovf;
  int           checks = 0, failures = 0;
  int           n_full = 0, n_ovf = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%0d empty=%b full=%b rd=%h", what, q.size(), empty, full, rd_data);
    end
  endtask

  task automatic cyc(input logic w, input logic [W-1:0] d, input logic r);
    wr_en = w; wr_data = d; rd_en = r && !empty;
    @(posedge clk);
    exp_ovf = w && (q.size() == D);
    if (rd_en) void'(q.pop_front());
    if (w && (q.size() < D || rd_en)) begin
      // a write is accepted only if the buffer was not full before the edge
      if (!exp_ovf) q.push_back(d);
    end
    #1;
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == D), "full");
    check(overflow == exp_ovf, "overflow");
    if (q.size() != 0) check(rd_data == q[0], "head");
    if (full) n_full++;
    if (overflow) n_ovf++;
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(empty && !full, "after reset");
    for (int i = 0; i < D + 3; i++) cyc(1'b1, W'($urandom), 1'b0);
    for (int i = 0; i < D + 3; i++) cyc(1'b0, '0, 1'b1);
    for (int i = 0; i < 3000; i++) cyc($urandom_range(0, 1), W'($urandom), $urandom_range(0, 1));
    check(n_full > 0 && n_ovf > 0, "full and overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
