// check_node_tb: random inputs; the sum, the sign XOR and the decision
// parity are recomputed here and compared one cycle later.
module check_node_tb;
  localparam int RHO = 32, MW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic valid_i, valid_o, sgn_o, par_o;
  logic [RHO-1:0][MW-1:0] phi;
  logic [RHO-1:0] sgn, dec;
  logic [MW+4:0] sum_o;
  check_node dut (.clk, .rst_n, .valid_i, .phi_i(phi), .sgn_i(sgn), .dec_i(dec),
                  .valid_o, .sum_o, .sgn_o, .parity_o(par_o));

  int checks = 0, failures = 0;
  int es, ex, ep, ev;
  bit pend = 0;

  initial begin
    valid_i = 0; phi = '0; sgn = '0; dec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (int'(sum_o) != es || sgn_o != ex[0] || par_o != ep[0] || valid_o != ev[0]) begin
          failures++;
          if (failures < 10) $display("FAIL sum %0d/%0d sgn %0d/%0d par %0d/%0d",
                                      sum_o, es, sgn_o, ex, par_o, ep);
        end
      end
      valid_i = ($urandom % 4) != 0;
      es = 0; ex = 0; ep = 0; ev = valid_i;
      for (int j = 0; j < RHO; j++) begin
        phi[j] = (k < 10) ? 5'd31 : MW'($urandom);   // all-maximum sums first
        sgn[j] = $urandom % 2;
        dec[j] = $urandom % 2;
        es += int'(phi[j]);
        ex ^= int'(sgn[j]);
        ep ^= int'(dec[j]);
      end
      pend = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
