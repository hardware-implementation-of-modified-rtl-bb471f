// tb_s2p - self-checking testbench for the serial to parallel converter.
//
// Random bits are fed with random in_valid gaps into a 32-bit and an 8-bit instance. The
// testbench builds each expected word itself (first bit received in the MSB) and checks
// that par_valid pulses exactly once per WIDTH accepted bits, in the cycle after the last
// bit, with the expected par_out, and that par_out holds between words.
module tb_s2p;
  logic        clk = 1'b0;
  logic        rst;
  logic        in_valid, ser_in;
  logic [31:0] w32;
  logic        v32;
  logic [7:0]  w8;
  logic        v8;
  int          checks = 0, failures = 0;

  s2p #(.WIDTH(32)) dut32 (.clk, .rst, .in_valid, .ser_in, .par_out(w32), .par_valid(v32));
  s2p #(.WIDTH(8))  dut8  (.clk, .rst, .in_valid, .ser_in, .par_out(w8),  .par_valid(v8));

  always #5 clk = ~clk;

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
      $display("FAIL %s at %0t: w32=%h w8=%h", what, $time, w32, w8);
    end
  endtask

  logic [31:0] acc32, hold32;
  logic [7:0]  acc8, hold8;
  int          n32, n8, words32, words8;

  initial begin
    in_valid = 0; ser_in = 0;
    acc32 = '0; acc8 = '0; n32 = 0; n8 = 0; hold32 = '0; hold8 = '0;
    words32 = 0; words8 = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(w32 == '0 && w8 == '0 && !v32 && !v8, "reset");
    for (int i = 0; i < 5000; i++) begin
      logic e32, e8;
      in_valid = ($urandom_range(0, 3) != 0);
      ser_in   = $urandom_range(0, 1);
      e32 = 1'b0; e8 = 1'b0;
      if (in_valid) begin
        acc32 = {acc32[30:0], ser_in}; n32++;
        acc8  = {acc8[6:0], ser_in};   n8++;
        if (n32 == 32) begin n32 = 0; hold32 = acc32; e32 = 1'b1; words32++; end
        if (n8 == 8)   begin n8 = 0;  hold8 = acc8;   e8 = 1'b1;  words8++;  end
      end
      @(posedge clk);
      #1;
      check(v32 == e32 && w32 == hold32, "32-bit word");
      check(v8 == e8 && w8 == hold8, "8-bit word");
    end
    check(words32 > 50 && words8 > 200, "enough words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
