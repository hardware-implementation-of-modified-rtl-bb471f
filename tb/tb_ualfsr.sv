// tb_ualfsr - self-checking testbench for the chaotic sequence generator.
//
// A behavioural reference register, written here from the recurrence
// msb_in = fill_sel ? din : (r[0] ^ r[4] ^ r[5] ^ r[9]), right shift, output r[0],
// is run beside the design under random fill_sel, din and shift_en. Every cycle the chip
// output and full register are compared. Also checked: clear on reset, an asynchronous
// reset pulse between clock edges, loading a known 17-bit key through din, and that an
// all-zero register stays at zero under feedback.
module tb_ualfsr;
  localparam int W = 17;

  logic         clk = 1'b0;
  logic         rst;
  logic         fill_sel, din, shift_en;
  logic         seq_out;
  logic [W-1:0] state;
  logic [W-1:0] model;
  int           checks = 0, failures = 0;

  ualfsr dut (.clk, .rst, .fill_sel, .din, .shift_en, .seq_out, .state);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: state=%h model=%h out=%b", what, state, model, seq_out);
    end
  endtask

  function automatic logic [W-1:0] step(input logic [W-1:0] r, input logic f, input logic d);
    logic fb;
    fb = f ? d : (r[0] ^ r[4] ^ r[5] ^ r[9]);
    return {fb, r[W-1:1]};
  endfunction

  task automatic cyc(input logic f, input logic d, input logic en);
    fill_sel = f; din = d; shift_en = en;
    @(posedge clk);
    if (en) model = step(model, f, d);
    #1;
    check(state == model && seq_out == model[0], "sequence");
  endtask

  logic [W-1:0] key;

  initial begin
    fill_sel = 0; din = 0; shift_en = 0; model = '0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 check(state == '0 && seq_out == 1'b0, "reset clears");
    rst = 0;
    // zero register under feedback stays zero
    repeat (40) cyc(1'b0, 1'b0, 1'b1);
    check(state == '0, "zero stays zero");
    // load a known key
    key = 17'h1B5A3;
    for (int i = 0; i < W; i++) cyc(1'b1, key[i], 1'b1);
    check(state == key, "key loaded");
    // free run with occasional stalls
    for (int i = 0; i < 600; i++) cyc(1'b0, $urandom_range(0, 1), ($urandom_range(0, 3) != 0));
    // fully random controls
    for (int i = 0; i < 600; i++) cyc(($urandom_range(0, 7) == 0), $urandom_range(0, 1), $urandom_range(0, 1));
    // asynchronous reset between edges
    @(negedge clk);
    rst = 1; #2;
    check(state == '0, "async reset");
    model = '0;
    @(negedge clk) rst = 0;
    // stall holds state
    key = 17'h0F0F1;
    for (int i = 0; i < W; i++) cyc(1'b1, key[i], 1'b1);
    repeat (10) cyc(1'b0, 1'b1, 1'b0);
    check(state == key, "stall holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
