// proc_unit_tb: one processing unit (column group 3) driven the way the
// controller drives it, with the rest of the decoder replaced by a check
// node model here that returns, one cycle after each request, the unit's
// own Phi value plus a random "other units" term X and a random sign
// product. Checked against values worked out here from the code's
// structure (bit r XOR alpha^(g+3) for check (g, r)) and the Phi table:
//  - every check-node request carries Phi(|Q|), sign and decision of the
//    right bit, for the loaded priors and after one bit-to-check pass;
//  - every request carries the prior sign, then the posterior sign, as decision;
//  - every posterior equals prior + sum of +-Phi(min(X, 31)).
module proc_unit_tb;
  localparam int W = 6, MW = 5, MAXM = 31, DELTA = 64, GAMMA = 6, UNIT = 3, AW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic load_en, c2b_en, b2c_en, cn_valid_o, cn_sgn_o, cn_dec_o, post_valid, dec;
  logic [5:0] load_bit, c2b_row, b2c_bit, post_bit;
  logic [2:0] c2b_lane, b2c_lane;
  logic [W-1:0] load_llr;
  logic [MW-1:0] cn_phi;
  logic cn_valid_i, cn_sgn_i;
  logic [9:0] cn_sum;
  logic signed [AW-1:0] post;

  proc_unit #(.UNIT(UNIT)) dut (.clk, .rst_n, .flush_i(1'b0),
    .load_en_i(load_en), .load_bit_i(load_bit), .load_llr_i(load_llr),
    .c2b_en_i(c2b_en), .c2b_lane_i(c2b_lane), .c2b_row_i(c2b_row),
    .cn_valid_o, .cn_phi_o(cn_phi), .cn_sgn_o, .cn_dec_o,
    .cn_valid_i, .cn_sum_i(cn_sum), .cn_sgn_i,
    .b2c_en_i(b2c_en), .b2c_bit_i(b2c_bit), .b2c_lane_i(b2c_lane),
    .post_valid_o(post_valid), .post_bit_o(post_bit), .post_o(post), .dec_o(dec));

  int checks = 0, failures = 0;
  int gexp [63];
  int phitab [32];
  int prior [DELTA];
  int qexp [DELTA][GAMMA];        // expected bit-to-check message (signed)
  int rexp [DELTA][GAMMA];        // expected check-to-bit message (signed)
  int postexp [DELTA];
  int req_g [$], req_r [$];
  int n_req = 0, n_post = 0, pass_no = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int v;
    v = 1;
    for (int i = 0; i < 63; i++) begin
      gexp[i] = v; v = v << 1; if (v & 64) v = v ^ 'h43;
    end
    for (int i = 0; i < 32; i++) begin
      automatic real x = (i == 0 ? 0.5 : real'(i)) / 4.0;
      automatic int q = int'(4.0 * $ln((1.0 + $exp(-x)) / (1.0 - $exp(-x))));
      phitab[i] = q > MAXM ? MAXM : q;
    end
  end

  // Check node model: returns own Phi + X one cycle later and records the
  // check-to-bit message the unit must then hold.
  always @(posedge clk) begin
    cn_valid_i <= 1'b0;
    if (rst_n && cn_valid_o) begin
      int g, r, c, q, x, sx, m;
      g = req_g.pop_front();
      r = req_r.pop_front();
      c = r ^ gexp[g + UNIT];
      q = qexp[c][g];
      n_req++;
      check(int'(cn_phi) == phitab[q < 0 ? -q : q] && cn_sgn_o == (q < 0),
            $sformatf("request g%0d r%0d bit %0d phi %0d q %0d", g, r, c, cn_phi, q));
      check(cn_dec_o == ((pass_no == 0) ? (prior[c] < 0) : (postexp[c] < 0)),
            $sformatf("decision of bit %0d", c));
      x  = (r % 7 == 0) ? 40 : int'($urandom % 32);
      sx = $urandom % 2;
      cn_valid_i <= 1'b1;
      cn_sum     <= 10'(int'(cn_phi) + x);
      cn_sgn_i   <= sx[0];
      m = x > MAXM ? MAXM : x;
      rexp[c][g] = ((sx != 0) != (q < 0)) ? -phitab[m] : phitab[m];
    end
  end

  always @(posedge clk) if (rst_n && post_valid) begin
    n_post++;
    check(int'(post) == postexp[post_bit] && dec == (postexp[post_bit] < 0),
          $sformatf("posterior bit %0d: %0d exp %0d", post_bit, post, postexp[post_bit]));
  end

  task automatic c2b_pass(bit check_dec);
    for (int g = 0; g < GAMMA; g++)
      for (int r = 0; r < DELTA; r++) begin
        @(negedge clk);
        c2b_en = 1; c2b_lane = 3'(g); c2b_row = 6'(r);
        req_g.push_back(g); req_r.push_back(r);
      end
    @(negedge clk) c2b_en = 0;
    repeat (3) @(negedge clk);
    pass_no++;
  endtask

  task automatic b2c_pass();
    for (int c = 0; c < DELTA; c++) begin
      int p = prior[c];
      for (int g = 0; g < GAMMA; g++) p += rexp[c][g];
      postexp[c] = p;
      for (int g = 0; g < GAMMA; g++) begin
        int qq = p - rexp[c][g];
        qexp[c][g] = qq > MAXM ? MAXM : (qq < -MAXM ? -MAXM : qq);
      end
    end
    for (int c = 0; c < DELTA; c++)
      for (int g = 0; g < GAMMA; g++) begin
        @(negedge clk);
        b2c_en = 1; b2c_bit = 6'(c); b2c_lane = 3'(g);
      end
    @(negedge clk) b2c_en = 0;
    repeat (9) @(negedge clk);
  endtask

  initial begin
    load_en = 0; c2b_en = 0; b2c_en = 0; load_bit = 0; c2b_row = 0; b2c_bit = 0;
    c2b_lane = 0; b2c_lane = 0; load_llr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < DELTA; c++) begin
      @(negedge clk);
      prior[c] = int'($urandom % 63) - 31;
      load_en = 1; load_bit = 6'(c);
      load_llr = prior[c] < 0 ? {1'b1, 5'(-prior[c])} : {1'b0, 5'(prior[c])};
      for (int g = 0; g < GAMMA; g++) qexp[c][g] = prior[c];
    end
    @(negedge clk) load_en = 0;
    c2b_pass(1'b1);
    b2c_pass();
    c2b_pass(1'b0);
    b2c_pass();
    check(n_req == 2 * DELTA * GAMMA, $sformatf("check requests %0d", n_req));
    check(n_post == 2 * DELTA, $sformatf("posteriors %0d", n_post));
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
