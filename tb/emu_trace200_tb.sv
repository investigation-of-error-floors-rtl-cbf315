// emu_trace200_tb: the error-trace experiment on the full-size platform.
// Frames are decoded with an iteration limit of 200, and for a frame that
// fails the soft decisions of its final 16 iterations (185 to 200) must be
// in the trace memory. The noise is set far below the code's threshold
// (sigma = 0.8) so that the frame is certain to fail; the per-iteration bit
// error counts of iterations 185..200 are recounted from the memory model,
// compared with the platform's counters and printed in the form of an
// error-count table. Then 5 frames at Eb/N0 = 5.2 dB (sigma = 0.424 for
// rate 0.841) with the same limit must all decode, ending by early
// termination.
module emu_trace200_tb;
  localparam int RHO = 32, DELTA = 64, AW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic host_start, host_stop, ack, seed_load, running, fail_pending, sram_we;
  logic [7:0] iter_limit, last_iters, pp_iter_limit, pp_last_iters;
  logic [31:0] pp_frames, pp_corrected;
  logic [11:0] pp_last_errs;
  logic [31:0] frame_limit, seed, frames, frame_errs, converged;
  logic [15:0] llr_mean, llr_scale;
  logic [47:0] bit_errs;
  logic [3:0] err_idx;
  logic [11:0] err_cnt;
  logic [9:0] sram_addr;
  logic [RHO*AW-1:0] sram_wdata;

  emu_top dut (.clk, .rst_n, .host_start_i(host_start), .host_stop_i(host_stop), .ack_i(ack),
    .iter_limit_i(iter_limit), .pp_iter_limit_i(pp_iter_limit), .frame_limit_i(frame_limit), .seed_load_i(seed_load),
    .seed_i(seed), .llr_mean_i(llr_mean), .llr_scale_i(llr_scale), .running_o(running),
    .fail_pending_o(fail_pending), .frames_o(frames), .frame_errs_o(frame_errs),
    .bit_errs_o(bit_errs), .converged_o(converged), .last_iters_o(last_iters),
    .pp_frames_o(pp_frames), .pp_corrected_o(pp_corrected), .pp_last_errs_o(pp_last_errs),
    .pp_last_iters_o(pp_last_iters),
    .err_idx_i(err_idx), .err_cnt_o(err_cnt), .sram_we_o(sram_we), .sram_addr_o(sram_addr),
    .sram_wdata_o(sram_wdata));

  logic [RHO*AW-1:0] sram [1024];
  int last_iter_in_slot [16];
  always @(posedge clk) if (sram_we) begin
    sram[sram_addr] <= sram_wdata;
    last_iter_in_slot[sram_addr[9:6]] <= int'(dut.u_dec.hd_iter_o);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic set_sigma(real sigma);
    llr_mean  = 16'(int'(2.0 / (sigma * sigma) * 4.0 * 256.0));
    llr_scale = 16'(int'(2.0 / sigma * 4.0 / 209.0 * 65536.0));
  endtask

  initial begin
    string line;
    host_start = 0; host_stop = 0; ack = 0; seed_load = 0; seed = 32'hE77;
    iter_limit = 200; pp_iter_limit = 20; frame_limit = 1; err_idx = 0;
    set_sigma(0.8);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    wait (fail_pending || !running);
    @(negedge clk);
    check(fail_pending, "frame failed and is held");
    check(last_iters == 200, "frame ran 200 iterations");
    line = "iteration:";
    for (int it = 185; it <= 200; it++) line = {line, $sformatf(" %4d", it)};
    $display("%s", line);
    line = "errors:   ";
    for (int it = 185; it <= 200; it++) begin
      automatic int cnt = 0;
      for (int b = 0; b < DELTA; b++)
        for (int j = 0; j < RHO; j++)
          if (sram[(it % 16) * 64 + b][j*AW + AW - 1]) cnt++;
      err_idx = 4'(it % 16);
      #1;
      check(last_iter_in_slot[it % 16] == it, $sformatf("slot %0d holds iteration %0d", it % 16, it));
      check(int'(err_cnt) == cnt, $sformatf("iteration %0d count %0d vs trace %0d", it, err_cnt, cnt));
      line = {line, $sformatf(" %4d", cnt)};
    end
    $display("%s", line);
    @(negedge clk) ack = 1;
    @(negedge clk) ack = 0;
    wait (!running);

    set_sigma(0.424);
    frame_limit = 5;
    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    while (running) begin
      @(negedge clk);
      if (fail_pending) begin ack = 1; @(negedge clk) ack = 0; end
    end
    $display("5.2 dB: frames %0d frame errors %0d converged %0d", frames, frame_errs, converged);
    check(frames == 5 && frame_errs == 0 && converged == 5, "all frames decode at 5.2 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
