// ldpc_decoder_tb: end-to-end check of the full-size LDPC decoder at the
// three wordlengths the decoder was built with, 6 bits (the default), 5
// and 9 bits, and at the 8 bits of the post-processing decoder. Each runs in its own decoder_bench, which compares every
// posterior with a bit-exact reference model and checks the frame timing,
// early termination, the iteration limit, load gaps and abort. The number
// of fraction bits is 2 for 5 and 6 bits, 3 for 8 bits and 4 for 9 bits.
module ldpc_decoder_tb;
  bit  fin6, fin5, fin9, fin8;
  int  c6, c5, c9, c8, f6, f5, f9, f8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  decoder_bench                      b6 (.finished(fin6), .checks(c6), .failures(f6));
  decoder_bench #(.W(5), .FRAC(2))   b5 (.finished(fin5), .checks(c5), .failures(f5));
  decoder_bench #(.W(9), .FRAC(4))   b9 (.finished(fin9), .checks(c9), .failures(f9));
  decoder_bench #(.W(8), .FRAC(3))   b8 (.finished(fin8), .checks(c8), .failures(f8));

  initial begin
    wait (fin6 && fin5 && fin9 && fin8);
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c5 + c9 + c8, f6 + f5 + f9 + f8);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c5 + c9 + c8, f6 + f5 + f9 + f8 + 1);
    $finish;
  end
endmodule
