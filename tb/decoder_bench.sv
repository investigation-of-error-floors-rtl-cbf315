// decoder_bench: reusable end-to-end bench for one LDPC decoder instance
// with wordlength W and FRAC fraction bits, compared bit for bit with a
// reference model of the same fixed-point algorithm.
//
// The reference keeps one message per edge, builds the parity-check matrix
// from its own GF(64) tables, and runs check-to-bit and bit-to-check
// updates exactly as the decoder is meant to (Phi-domain sum at the check,
// local marginalization, serial posterior and marginalization at the bit).
// Every posterior and hard decision the decoder emits is compared, as are
// the iteration count and the early-termination flag. Frames: a clean
// one-iteration frame (cycle count checked against the 64 + 384 + 384 cycle
// schedule plus pipeline stalls), frames at several noise levels that end by
// early termination or by the iteration limit, a frame loaded with gaps in
// llr_valid, and an aborted frame. Each mechanism must occur at least once.
module decoder_bench
  import ldpc_pkg::*;
#(
  parameter int W    = ldpc_pkg::W_DEF,
  parameter int FRAC = ldpc_pkg::FRAC_DEF
) (
  output bit finished,
  output int checks,
  output int failures
);
  localparam int MW = W - 1, MAXM = 2**MW - 1;
  localparam int AW = W + $clog2(GAMMA + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, stop, llr_valid, llr_ready, hd_valid, busy, done, conv, stall;
  logic [ITW-1:0] iter_limit, hd_iter, iter;
  logic [5:0] hd_bit;
  logic [RHO-1:0] hd_dec;
  logic [RHO-1:0][AW-1:0] hd_post;
  logic [RHO-1:0][W-1:0] llr;
  phase_t phase;

  ldpc_decoder #(.W(W), .FRAC(FRAC)) dut (
    .clk, .rst_n, .start_i(start), .stop_i(stop), .iter_limit_i(iter_limit),
    .llr_valid_i(llr_valid), .llr_ready_o(llr_ready), .llr_i(llr),
    .hd_valid_o(hd_valid), .hd_iter_o(hd_iter), .hd_bit_o(hd_bit), .hd_dec_o(hd_dec),
    .hd_post_o(hd_post), .busy_o(busy), .done_o(done), .converged_o(conv),
    .stall_o(stall), .phase_o(phase), .iter_o(iter));

  int frame_no = 0;
  initial begin checks = 0; failures = 0; finished = 1'b0; end
  int n_stall = 0, n_early = 0, n_limit = 0, n_sat = 0, n_gap = 0, n_abort = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL W=%0d %s (frame %0d)", W, what, frame_no);
    end
  endtask

  // ---------------- reference model ----------------
  int gexp [126];
  int phitab [2**MW];
  int colof [GAMMA][RHO][DELTA];
  int prior [RHO][DELTA];            // signed value
  int qv    [RHO][DELTA][GAMMA];     // signed bit-to-check message
  int rsm_s [RHO][DELTA][GAMMA];     // check-to-bit: sign
  int rsm_m [RHO][DELTA][GAMMA];     // check-to-bit: Phi-domain magnitude
  int post  [RHO][DELTA];
  int decm  [RHO][DELTA];
  localparam int MAXIT = 20;
  int exp_post [MAXIT+1][RHO][DELTA]; // posteriors per iteration
  int model_iters;
  bit model_conv;

  function automatic int sm2int(logic [W-1:0] v);
    return v[W-1] ? -int'(v[W-2:0]) : int'(v[W-2:0]);
  endfunction

  initial begin
    int v = 1;
    for (int i = 0; i < 63; i++) begin
      gexp[i] = v;
      v = v * 2;
      if (v >= 64) v = v ^ 'h43;
    end
    for (int i = 63; i < 126; i++) gexp[i] = gexp[i-63];
    for (int g = 0; g < GAMMA; g++)
      for (int j = 0; j < RHO; j++)
        for (int r = 0; r < DELTA; r++)
          colof[g][j][r] = r ^ gexp[g + j];
    for (int i = 0; i <= MAXM; i++) begin
      automatic real x = (i == 0 ? 0.5 : real'(i)) / real'(2**FRAC);
      automatic int  q = int'($ln((1.0 + $exp(-x)) / (1.0 - $exp(-x))) * real'(2**FRAC));
      phitab[i] = q > MAXM ? MAXM : q;
    end
  end

  function automatic int sat(int x);
    if (x > MAXM) begin n_sat++; return MAXM; end
    if (x < -MAXM) begin n_sat++; return -MAXM; end
    return x;
  endfunction

  task automatic model_run(int limit);
    model_conv = 1'b0;
    for (int j = 0; j < RHO; j++)
      for (int c = 0; c < DELTA; c++) begin
        decm[j][c] = prior[j][c] < 0;
        for (int g = 0; g < GAMMA; g++) qv[j][c][g] = prior[j][c];
      end
    if (limit == 0) limit = 1;
    for (int it = 1; it <= limit; it++) begin
      bit unsat = 1'b0;
      model_iters = it;
      for (int g = 0; g < GAMMA; g++)
        for (int r = 0; r < DELTA; r++) begin
          int s = 0, sx = 0, par = 0;
          for (int j = 0; j < RHO; j++) begin
            int q = qv[j][colof[g][j][r]][g];
            s += phitab[q < 0 ? -q : q];
            sx ^= (q < 0);
            par ^= decm[j][colof[g][j][r]];
          end
          if (par) unsat = 1'b1;
          for (int j = 0; j < RHO; j++) begin
            int c = colof[g][j][r];
            int q = qv[j][c][g];
            int m = s - phitab[q < 0 ? -q : q];
            rsm_s[j][c][g] = sx ^ (q < 0);
            rsm_m[j][c][g] = m > MAXM ? MAXM : m;
          end
        end
      if (it > 1 && !unsat) begin
        model_conv = 1'b1;
        model_iters = it;
        return;
      end
      for (int j = 0; j < RHO; j++)
        for (int c = 0; c < DELTA; c++) begin
          int rr [GAMMA];
          int p = prior[j][c];
          for (int g = 0; g < GAMMA; g++) begin
            rr[g] = rsm_s[j][c][g] ? -phitab[rsm_m[j][c][g]] : phitab[rsm_m[j][c][g]];
            p += rr[g];
          end
          post[j][c] = p;
          decm[j][c] = p < 0;
          exp_post[it][j][c] = p;
          for (int g = 0; g < GAMMA; g++) qv[j][c][g] = sat(p - rr[g]);
        end
    end
  endtask

  // ---------------- stimulus ----------------
  logic [W-1:0] frame [RHO][DELTA];

  function automatic logic [W-1:0] quant(real l);
    int q = int'(l * real'(2**FRAC));
    if (q > MAXM) q = MAXM;
    if (q < -MAXM) q = -MAXM;
    return q < 0 ? {1'b1, (W-1)'(-q)} : {1'b0, (W-1)'(q)};
  endfunction

  function automatic real gauss();
    real u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    real u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // All-zeros codeword over BPSK/AWGN with noise standard deviation sigma.
  task automatic make_frame(real sigma);
    for (int j = 0; j < RHO; j++)
      for (int c = 0; c < DELTA; c++) begin
        real y = 1.0 + sigma * gauss();
        frame[j][c] = quant(2.0 * y / (sigma * sigma));
        prior[j][c] = sm2int(frame[j][c]);
      end
  endtask

  // Monitor: compare every emitted posterior with the reference.
  int hd_seen;
  int last_iter_seen;
  always @(posedge clk) if (rst_n && hd_valid) begin
    hd_seen++;
    last_iter_seen = int'(hd_iter);
    for (int j = 0; j < RHO; j++) begin
      int e, got;
      e   = (int'(hd_iter) <= MAXIT) ? exp_post[int'(hd_iter)][j][int'(hd_bit)] : 99999;
      got = int'($signed(hd_post[j]));
      check(got == e && hd_dec[j] == (e < 0),
            $sformatf("posterior iter %0d unit %0d bit %0d: got %0d exp %0d",
                      hd_iter, j, hd_bit, got, e));
    end
  end
  always @(posedge clk) if (rst_n && stall) n_stall++;

  int frame_cycles;
  task automatic run_frame(int limit, bit gaps, bit abort_it);
    int cyc = 0;
    bit acc;
    frame_no++;
    model_run(limit);
    hd_seen = 0;
    iter_limit = ITW'(limit);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int k = 0; k < DELTA; ) begin
      llr_valid = gaps ? ($urandom % 3 != 0) : 1'b1;
      if (!llr_valid) n_gap++;
      for (int j = 0; j < RHO; j++) llr[j] = frame[j][k];
      #1;
      acc = llr_valid && llr_ready;
      @(posedge clk);
      cyc++;
      if (acc) k++;
      @(negedge clk);
    end
    llr_valid = 1'b0;
    if (abort_it) begin
      repeat (500) @(negedge clk);
      stop = 1'b1;
      @(negedge clk) stop = 1'b0;
      @(negedge clk);
      check(!busy && phase == PH_IDLE, "stop aborts the frame");
      n_abort++;
      return;
    end
    while (!done) begin
      @(posedge clk); cyc++;
      #1;
    end
    frame_cycles = cyc;
    check(int'(iter) == model_iters, $sformatf("iterations %0d exp %0d", iter, model_iters));
    check(conv == model_conv, $sformatf("converged %0d exp %0d", conv, model_conv));
    check(hd_seen == DELTA * (model_conv ? model_iters - 1 : model_iters),
          $sformatf("hd bursts %0d", hd_seen));
    if (model_conv) n_early++; else n_limit++;
    @(negedge clk);
  endtask

  initial begin
    start = 0; stop = 0; llr_valid = 0; iter_limit = 1; llr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. one iteration: schedule length
    make_frame(0.35);
    run_frame(1, 1'b0, 1'b0);
    $display("W=%0d one-iteration frame:", W); $display("   %0d cycles from first load cycle, %.3f bits/cycle",
             frame_cycles, 2048.0 / real'(frame_cycles));
    check(frame_cycles == DELTA + 2*DELTA*GAMMA + 3 + (GAMMA + 2), "one-iteration cycle count");
    check(frame_cycles <= 850, "peak throughput at least 2.41 bits/cycle");

    // 2. moderate noise: early termination expected
    make_frame(0.45);
    run_frame(20, 1'b0, 1'b0);
    // 3. heavy noise: iteration limit expected, saturation exercised
    make_frame(0.80);
    run_frame(4, 1'b0, 1'b0);
    // 4. gaps in the load handshake
    make_frame(0.50);
    run_frame(10, 1'b1, 1'b0);
    // 5. aborted frame, then a normal one after it
    make_frame(0.50);
    run_frame(10, 1'b0, 1'b1);
    make_frame(0.40);
    run_frame(10, 1'b0, 1'b0);

    $display("W=%0d mechanisms:", W); $display("   stall_cycles=%0d early_stop=%0d limit_stop=%0d saturations=%0d load_gaps=%0d aborts=%0d",
             n_stall, n_early, n_limit, n_sat, n_gap, n_abort);
    check(n_stall > 0, "pipeline stall happened");
    check(n_early > 0, "early termination happened");
    check(n_limit > 0, "iteration limit reached");
    check(n_sat > 0, "message saturation happened");
    check(n_gap > 0, "load handshake gap happened");
    check(n_abort > 0, "abort happened");
    finished = 1'b1;
  end
endmodule
