// tb_ds_ss_example - the link run under the example stimulus: valid and shift_en held high,
// fill_sel and din held low, data_in fixed at 1001_1100.
//
// With valid held high the byte is written on every clock until the buffer is full, so the
// link carries the same byte back to back. Run straight from reset, the generator holds all
// zeros, every channel word is zero and each recovered byte is 0000_0000: the chaotic
// sequence carries nothing until a key is loaded. The run is then repeated after loading a
// 17-bit key through fill_sel/din, and every recovered byte must be 1001_1100. Each phase
// runs for ten byte times (8 bits x 32 chips each) and checks the number of bytes delivered.
module tb_ds_ss_example;
  localparam int LW = 17, CH = 32, DW = 8;
  localparam logic [DW-1:0] BYTE = 8'b1001_1100;

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
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: data_out=%b", what, $time, data_out);
    end
  endtask

  task automatic run(input logic [DW-1:0] expect_byte, input bit expect_zero_chips,
                     output int nbytes);
    nbytes = 0;
    valid = 1'b1; data_in = BYTE; fill_sel = 1'b0; din = 1'b0; shift_en = 1'b1;
    repeat (10 * DW * CH) begin
      @(posedge clk);
      #1;
      if (spread_valid && expect_zero_chips) check(spread_data == '0, "zero channel word");
      if (data_valid) begin
        check(data_out == expect_byte, "recovered byte");
        nbytes++;
      end
    end
  endtask

  int n;

  initial begin
    valid = 0; data_in = '0; fill_sel = 0; din = 0; shift_en = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run('0, 1'b1, n);
    check(n >= 9, "bytes delivered without key");
    $display("without key: %0d bytes, each 0000_0000", n);

    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < LW; i++) begin
      fill_sel = 1'b1; din = (17'h15A6D >> i) & 1; shift_en = 1'b1;
      @(posedge clk);
      #1;
    end
    run(BYTE, 1'b0, n);
    check(n >= 9, "bytes delivered with key");
    $display("with key: %0d bytes, each 1001_1100", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
