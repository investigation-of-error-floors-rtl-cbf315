// awgn_gen_tb: statistics of the noise generator. With zero scale every
// lane must give exactly the programmed mean (or its saturated value);
// with noise, the sample mean and standard deviation over 32 lanes x 4000
// samples must match the programmed values (the raw noise has standard
// deviation sqrt(8 * (256^2 - 1) / 12) = 209.0 units); holding en_i must
// freeze the output; re-seeding must reproduce the sequence. The
// post-processing output (8 bits, one more fraction bit) must be the same
// sample: twice the 6-bit value within one LSB, or saturated.
module awgn_gen_tb;
  localparam int W = 6, RHO = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic seed_load, en;
  logic [31:0] seed;
  logic [15:0] mean, scale;
  localparam int WP = 8;
  logic [RHO-1:0][W-1:0] llr;
  logic [RHO-1:0][WP-1:0] llr_pp;
  awgn_gen dut (.clk, .rst_n, .seed_load_i(seed_load), .seed_i(seed), .en_i(en),
                .llr_mean_i(mean), .llr_scale_i(scale), .llr_o(llr), .llr_pp_o(llr_pp));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  function automatic int val(logic [W-1:0] v);
    return v[W-1] ? -int'(v[W-2:0]) : int'(v[W-2:0]);
  endfunction
  function automatic int valp(logic [WP-1:0] v);
    return v[WP-1] ? -int'(v[WP-2:0]) : int'(v[WP-2:0]);
  endfunction
  int pp_bad = 0, pp_seen = 0;

  task automatic stats(real m_exp, real s_exp, real tol_m, real tol_s);
    real s1 = 0, s2 = 0, m, sd;
    int n = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      for (int i = 0; i < RHO; i++) begin
        s1 += real'(val(llr[i]));
        s2 += real'(val(llr[i])) ** 2;
        n++;
        if (val(llr[i]) > -31 && val(llr[i]) < 31 && valp(llr_pp[i]) > -127 && valp(llr_pp[i]) < 127) begin
          pp_seen++;
          if (valp(llr_pp[i]) - 2 * val(llr[i]) > 1 || 2 * val(llr[i]) - valp(llr_pp[i]) > 1) pp_bad++;
        end
      end
    end
    m  = s1 / n;
    sd = $sqrt(s2 / n - m * m);
    $display("mean %.3f (exp %.3f) std %.3f (exp %.3f)", m, m_exp, sd, s_exp);
    check(m > m_exp - tol_m && m < m_exp + tol_m, "sample mean");
    check(sd > s_exp - tol_s && sd < s_exp + tol_s, "sample standard deviation");
  endtask

  logic [RHO-1:0][W-1:0] rec [8];

  initial begin
    seed_load = 0; en = 0; seed = 32'h1234; mean = 0; scale = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // no noise: exact mean, with saturation
    en = 1; mean = 16'd7 << 8; scale = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < RHO; i++) check(val(llr[i]) == 7, "noise-free mean 7");
    for (int i = 0; i < RHO; i++) check(valp(llr_pp[i]) == 14, "post-processing mean 14");
    mean = 16'd100 << 8;
    @(negedge clk);
    for (int i = 0; i < RHO; i++) check(val(llr[i]) == 31, "saturated mean");
    for (int i = 0; i < RHO; i++) check(valp(llr_pp[i]) == 127, "post-processing saturated");
    mean = 16'd40 << 8;
    @(negedge clk);
    for (int i = 0; i < RHO; i++) check(val(llr[i]) == 31 && valp(llr_pp[i]) == 80, "mean 40");
    // zero mean, standard deviation 8 LSB
    mean = 0; scale = 16'(int'(8.0 / 209.0 * 65536.0));
    stats(0.0, 8.0, 0.15, 0.3);
    // mean 10, standard deviation 4 LSB
    mean = 16'(10 * 256); scale = 16'(int'(4.0 / 209.0 * 65536.0));
    stats(10.0, 4.0, 0.15, 0.2);
    $display("post-processing samples %0d, off by more than one LSB %0d", pp_seen, pp_bad);
    check(pp_seen > 100000 && pp_bad == 0, "post-processing output is the same sample");
    // freeze
    en = 0;
    @(negedge clk) rec[0] = llr;
    repeat (3) @(negedge clk);
    check(llr == rec[0], "output frozen while en_i is low");
    // reseed reproduces the sequence
    seed = 32'hCAFE; seed_load = 1;
    @(negedge clk) seed_load = 0; en = 1;
    for (int k = 0; k < 8; k++) begin rec[k] = llr; @(negedge clk); end
    seed_load = 1;
    @(negedge clk) seed_load = 0;
    for (int k = 0; k < 8; k++) begin check(llr == rec[k], "reseed repeats"); @(negedge clk); end
    check(rec[0][0] != rec[0][1] || rec[1][0] != rec[1][1], "lanes differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
