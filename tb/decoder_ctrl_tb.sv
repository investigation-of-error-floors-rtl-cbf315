// decoder_ctrl_tb: drives the sequencer with a model of the check node's
// parity output (three cycles after each check-to-bit issue) and checks
// the issue order of every phase, the stall lengths, the cycle count of a
// frame, stopping at the iteration limit, early termination (including an
// unsatisfied check reported during the stall) and abort.
module decoder_ctrl_tb;
  import ldpc_pkg::*;
  localparam int DELTA = 64, GAMMA = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, stop, llr_valid, llr_ready, load_en, c2b_en, b2c_en, par_valid, par;
  logic busy, stall, done, conv;
  logic [ITW-1:0] iter_limit, iter;
  logic [5:0] load_bit, c2b_row, b2c_bit;
  logic [2:0] c2b_lane, b2c_lane;
  phase_t phase;

  decoder_ctrl dut (.clk, .rst_n, .start_i(start), .stop_i(stop), .iter_limit_i(iter_limit),
    .llr_valid_i(llr_valid), .llr_ready_o(llr_ready), .load_en_o(load_en), .load_bit_o(load_bit),
    .c2b_en_o(c2b_en), .c2b_lane_o(c2b_lane), .c2b_row_o(c2b_row),
    .b2c_en_o(b2c_en), .b2c_bit_o(b2c_bit), .b2c_lane_o(b2c_lane),
    .par_valid_i(par_valid), .par_i(par), .phase_o(phase), .iter_o(iter), .busy_o(busy),
    .stall_o(stall), .done_o(done), .converged_o(conv));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // parity model: unsat_iter/unsat_idx name the one failing check (-1: none)
  int unsat_iter [$];
  int unsat_all_until;         // iterations up to this one fail everywhere
  logic [2:0] dly;
  int c2b_cnt, b2c_cnt, load_cnt, stall_run, cyc;
  always @(posedge clk) begin
    dly <= {dly[1:0], c2b_en};
    if (c2b_en) begin
      check(int'(c2b_lane) == c2b_cnt / DELTA && int'(c2b_row) == c2b_cnt % DELTA, "c2b order");
      c2b_cnt = (c2b_cnt + 1) % (DELTA * GAMMA);
    end
    if (b2c_en) begin
      check(int'(b2c_bit) == b2c_cnt / GAMMA && int'(b2c_lane) == b2c_cnt % GAMMA, "b2c order");
      b2c_cnt = (b2c_cnt + 1) % (DELTA * GAMMA);
    end
    if (load_en) begin
      check(int'(load_bit) == load_cnt, $sformatf("load order %0d exp %0d", load_bit, load_cnt));
      load_cnt++;
    end
    if (stall) stall_run++;
    else if (stall_run != 0) begin
      check(stall_run == 3 || stall_run == GAMMA + 2, $sformatf("stall length %0d", stall_run));
      stall_run = 0;
    end
  end
  // the last check's parity arrives 3 cycles after its issue, i.e. in the stall
  assign par_valid = dly[2];
  int pcount;
  always @(posedge clk) if (par_valid) pcount = (pcount + 1) % (DELTA * GAMMA);
  assign par = par_valid && ((int'(iter) <= unsat_all_until) ||
                             (int'(iter) == unsat_all_until + 1 && pcount == DELTA * GAMMA - 1));

  task automatic frame(int limit, int fail_until, bit gaps, int exp_iter, bit exp_conv, int exp_cyc);
    load_cnt = 0;
    unsat_all_until = fail_until;
    iter_limit = ITW'(limit);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin
      llr_valid = gaps ? ($urandom % 2) : 1'b1;
      @(negedge clk);
      cyc++;
    end
    check(load_cnt == DELTA, "all priors loaded");
    check(int'(iter) == exp_iter, $sformatf("iterations %0d exp %0d", iter, exp_iter));
    check(conv == exp_conv, "converged flag");
    if (exp_cyc > 0) check(cyc == exp_cyc, $sformatf("frame cycles %0d exp %0d", cyc, exp_cyc));
    @(negedge clk);
    check(phase == PH_IDLE && !busy, "back to idle");
  endtask

  initial begin
    start = 0; stop = 0; llr_valid = 0; iter_limit = 1; dly = 0; c2b_cnt = 0; b2c_cnt = 0;
    stall_run = 0; pcount = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one iteration: 64 + 384 + 3 + 384 + 8 cycles, then done
    frame(1, 99, 1'b0, 1, 1'b0, 843);
    // three iterations, never satisfied: stops at the limit
    frame(3, 99, 1'b0, 3, 1'b0, 64 + 3 * (384 + 3 + 384 + 8));
    // checks fail in iteration 1, one fails in 2 (seen in the stall), 3 clean
    frame(10, 1, 1'b0, 3, 1'b1, 64 + 2 * (384 + 3 + 384 + 8) + 384 + 3);
    // load with gaps
    frame(2, 0, 1'b1, 2, 1'b1, 0);
    // abort during bit-to-check
    load_cnt = 0;
    @(negedge clk) start = 1; iter_limit = 5;
    @(negedge clk) start = 0; llr_valid = 1;
    wait (phase == PH_B2C);
    repeat (10) @(negedge clk);
    stop = 1;
    @(negedge clk) stop = 0;
    check(phase == PH_IDLE, "abort");
    b2c_cnt = 0;
    frame(1, 99, 1'b0, 1, 1'b0, 843);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
