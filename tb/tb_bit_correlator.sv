// tb_bit_correlator - self-checking testbench for the despreading decision.
//
// For random chaotic words the testbench forms the word a 1 bit and a 0 bit would produce,
// flips a random number of chips, and computes the expected decision by counting how many
// chips differ from each hypothesis. It covers error-free words (which must decide exactly
// and flag exact), words with a few chip errors (which must still decide correctly), heavily
// corrupted words, ties, and the all-zero chaotic word (which must decide 0).
module tb_bit_correlator;
  localparam int W = 32;

  logic [W-1:0] rx_word, ref_word;
  logic         bit_out, exact;
  int           checks = 0, failures = 0;

  bit_correlator #(.WIDTH(W)) dut (.*);

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
      $display("FAIL %s: rx=%h ref=%h bit=%b", what, rx_word, ref_word, bit_out);
    end
  endtask

  function automatic int ones(input logic [W-1:0] v);
    int n = 0;
    for (int i = 0; i < W; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic         b;
      logic [W-1:0] err;
      int           nerr;
      ref_word = $urandom;
      b        = $urandom_range(0, 1);
      nerr     = (t < 1000) ? 0 : $urandom_range(0, (t < 3000) ? 3 : 20);
      err      = '0;
      for (int k = 0; k < nerr; k++) err[$urandom_range(0, W - 1)] = 1'b1;
      rx_word  = (b ? ref_word : '0) ^ err;
      #1;
      check(bit_out == (ones(rx_word ^ ref_word) < ones(rx_word)), "nearest hypothesis");
      if (nerr == 0) begin
        check(bit_out == (b && ref_word != '0), "error-free decision");
        check(exact, "exact flag");
      end else if (2 * ones(err) < ones(ref_word)) begin
        check(bit_out == b, "decision under chip errors");
      end
    end
    // all-zero chaotic word: no information, decides 0
    ref_word = '0; rx_word = '0; #1;
    check(bit_out == 1'b0 && exact, "zero sequence");
    // a tie decides 0
    ref_word = 32'h0000_000F; rx_word = 32'h0000_0003; #1;
    check(bit_out == 1'b0 && !exact, "tie");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
