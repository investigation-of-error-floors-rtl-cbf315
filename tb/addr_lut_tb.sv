// addr_lut_tb: checks the lookup tables of several processing units against
// the parity-check matrix built here from its own GF(64) antilog table
// (alpha root of x^6 + x + 1): row r of row group g meets, in column group j,
// the bit r XOR alpha^(g+j). Also checks that every block is a permutation
// and that two checks share at most one bit in any pair of groups.
module addr_lut_tb;
  localparam int DELTA = 64, GAMMA = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] lane;
  logic [5:0] row;
  logic [5:0] col0, col5, col31;
  addr_lut #(.UNIT(0))  u0  (.lane_i(lane), .row_i(row), .bit_o(col0));
  addr_lut #(.UNIT(5))  u5  (.lane_i(lane), .row_i(row), .bit_o(col5));
  addr_lut #(.UNIT(31)) u31 (.lane_i(lane), .row_i(row), .bit_o(col31));

  int checks = 0, failures = 0;
  int gexp [63];
  int seen0 [GAMMA][DELTA], seen31 [GAMMA][DELTA];
  int t0 [GAMMA][DELTA], t5 [GAMMA][DELTA], t31 [GAMMA][DELTA];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int v;
    v = 1;
    for (int i = 0; i < 63; i++) begin
      gexp[i] = v;
      v = v << 1;
      if (v & 64) v = v ^ 'h43;
    end
    for (int g = 0; g < GAMMA; g++)
      for (int r = 0; r < DELTA; r++) begin
        lane = 3'(g); row = 6'(r);
        @(posedge clk);
        t0[g][r] = col0; t5[g][r] = col5; t31[g][r] = col31;
        check(int'(col0)  == (r ^ gexp[g]),      $sformatf("unit 0 g%0d r%0d", g, r));
        check(int'(col5)  == (r ^ gexp[g + 5]),  $sformatf("unit 5 g%0d r%0d", g, r));
        check(int'(col31) == (r ^ gexp[g + 31]), $sformatf("unit 31 g%0d r%0d", g, r));
        seen0[g][col0]++;
        seen31[g][col31]++;
      end
    for (int g = 0; g < GAMMA; g++)
      for (int c = 0; c < DELTA; c++)
        check(seen0[g][c] == 1 && seen31[g][c] == 1, "block is a permutation");
    // no 4-cycle between column groups 0 and 31
    for (int g1 = 0; g1 < GAMMA; g1++)
      for (int g2 = g1 + 1; g2 < GAMMA; g2++)
        for (int r1 = 0; r1 < DELTA; r1++)
          for (int r2 = 0; r2 < DELTA; r2++)
            if (t0[g1][r1] == t0[g2][r2] && t31[g1][r1] == t31[g2][r2]) begin
              failures++; $display("FAIL 4-cycle g%0d r%0d g%0d r%0d", g1, r1, g2, r2);
            end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
