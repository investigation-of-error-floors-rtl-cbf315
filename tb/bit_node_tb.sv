// bit_node_tb: streams of random check-to-bit messages, GAMMA per bit, with
// idle cycles between some bits and a flush in the middle. Every output is
// compared with Q = sat(prior + sum(R) - R_g) and the posterior/decision
// worked out here; the output must come exactly GAMMA cycles after its
// input.
module bit_node_tb;
  localparam int W = 6, GAMMA = 6, MAXM = 31, AW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, out_dec, flush;
  logic [5:0] in_bit, out_bit;
  logic [2:0] in_lane, out_lane;
  logic signed [W-1:0] in_r, prior;
  logic [W-1:0] out_q;
  logic signed [AW-1:0] out_post;
  bit_node dut (.clk, .rst_n, .flush_i(flush), .in_valid_i(in_valid), .in_bit_i(in_bit),
    .in_lane_i(in_lane), .in_r_i(in_r), .prior_i(prior), .out_valid_o(out_valid),
    .out_bit_o(out_bit), .out_lane_o(out_lane), .out_q_o(out_q), .out_dec_o(out_dec),
    .out_post_o(out_post));

  int checks = 0, failures = 0, n_sat = 0, n_gap = 0, n_flush = 0;
  // expected outputs, indexed by the cycle they must appear in
  int exp_q [int], exp_post [int], exp_bit [int], exp_lane [int];
  int cyc = 0;

  function automatic int to_sm(int x);
    int m = x < 0 ? -x : x;
    if (m > MAXM) begin m = MAXM; n_sat++; end
    return (x < 0 ? 32 : 0) + m;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      checks++;
      if (exp_q.exists(cyc)) begin
        if (!out_valid || int'(out_q) != exp_q[cyc] || int'(out_post) != exp_post[cyc] ||
            out_dec != (exp_post[cyc] < 0) || int'(out_bit) != exp_bit[cyc] ||
            int'(out_lane) != exp_lane[cyc]) begin
          failures++;
          if (failures < 10)
            $display("FAIL cyc %0d: v%0d q %0d/%0d post %0d/%0d", cyc, out_valid, out_q,
                     exp_q[cyc], out_post, exp_post[cyc]);
        end
      end else if (out_valid) begin
        failures++;
        if (failures < 10) $display("FAIL unexpected output at cyc %0d", cyc);
      end
    end
  end

  initial begin
    in_valid = 0; in_bit = 0; in_lane = 0; in_r = 0; prior = 0; flush = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 400; b++) begin
      int rr [GAMMA];
      int p, post;
      bit do_flush;
      do_flush = (b == 200);
      p = int'($urandom % 63) - 31;
      post = p;
      for (int g = 0; g < GAMMA; g++) begin
        rr[g] = (b < 20) ? 31 : int'($urandom % 63) - 31;   // saturation early on
        post += rr[g];
      end
      for (int g = 0; g < GAMMA; g++) begin
        @(negedge clk);
        in_valid = 1; in_bit = 6'(b); in_lane = 3'(g);
        in_r = W'(rr[g]); prior = W'(p);
        if (!do_flush || g == 0) begin   // lane 0 leaves in the flush cycle itself
          exp_q[cyc + GAMMA]    = to_sm(post - rr[g]);
          exp_post[cyc + GAMMA] = post;
          exp_bit[cyc + GAMMA]  = b % 64;
          exp_lane[cyc + GAMMA] = g;
        end
      end
      if (do_flush) begin
        @(negedge clk);
        in_valid = 0;
        flush = 1;
        n_flush++;
        @(negedge clk) flush = 0;
      end
      if ($urandom % 5 == 0) begin
        @(negedge clk) in_valid = 0;
        n_gap++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_sat == 0 || n_gap == 0 || n_flush == 0) begin
      failures++; $display("FAIL mechanism missing: sat %0d gap %0d flush %0d", n_sat, n_gap, n_flush);
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
