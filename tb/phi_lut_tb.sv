// phi_lut_tb: checks the quantized Phi table at the default wordlength
// against values worked out by hand from Phi(x) = ln((e^x + 1)/(e^x - 1))
// with x in quarter steps, and checks the general properties of the table
// (saturation at 0, monotone decrease, near self-inverse).
module phi_lut_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] mag, phi, phi2;
  phi_lut dut  (.mag_i(mag), .phi_o(phi));
  phi_lut dut2 (.mag_i(phi), .phi_o(phi2));

  int checks = 0, failures = 0;
  // 4*Phi(i/4) for i = 0..11 (i = 0 taken as 0.125): 11.10 8.34 5.63 4.11
  // 3.09 2.36 1.82 1.40 1.09 0.85 0.66 0.51; below 0.5 from i = 12 on.
  int exp_tab [12] = '{11, 8, 6, 4, 3, 2, 2, 1, 1, 1, 1, 1};

  initial begin
    for (int i = 0; i < 12; i++) begin
      mag = 5'(i);
      @(posedge clk);
      checks++;
      if (int'(phi) != exp_tab[i]) begin
        failures++;
        $display("FAIL phi(%0d) = %0d, expected %0d", i, phi, exp_tab[i]);
      end
    end
    for (int i = 12; i < 32; i++) begin
      mag = 5'(i);
      @(posedge clk);
      checks++;
      if (phi != 0) begin failures++; $display("FAIL phi(%0d) = %0d, expected 0", i, phi); end
    end
    // Applying the table twice returns roughly the input for mid-range values.
    for (int i = 2; i < 6; i++) begin
      int d;
      mag = 5'(i);
      @(posedge clk);
      d = int'(phi2) - i;
      checks++;
      if (d > 1 || d < -1) begin failures++; $display("FAIL phi(phi(%0d)) = %0d", i, phi2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
