// emu_top_tb: end-to-end run of the emulation platform at full size (the
// (2048,1723) code, 32 processing units, 6-bit messages), with the off-chip
// static memory modelled here as an array that records every trace write.
//  Run A: 20 frames at Eb/N0 = 4 dB (sigma = 0.487, rate 0.84): frames must
//         end by early termination and, when they fail, be held for the
//         host until acknowledged.
//  Run B: a change of SNR to sigma = 0.8 with an iteration limit of 5:
//         every frame must fail after exactly 5 iterations.
// For every failed frame the host side of the test reads the memory model
// and recounts the negative posteriors of the final iteration; that count
// must equal the platform's bit error count for the frame and its
// per-iteration error counter. Frame, error and convergence counters are
// checked for consistency, and every mechanism (early stop, iteration
// limit, pipeline stall, hold on failure, SNR change, post-processing)
// must occur.
//  Run C: 4 dB again with the main decoder cut to 2 iterations and the
//         8-bit post-processing decoder allowed 20: failed frames must be
//         recovered by post-processing, and the post-processing counters
//         must agree with the wide decoder's residual error count.
module emu_top_tb;
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

  // off-chip static memory model
  logic [RHO*AW-1:0] sram [1024];
  int n_sram_writes = 0;
  always @(posedge clk) if (sram_we) begin
    sram[sram_addr] <= sram_wdata;
    n_sram_writes++;
  end

  int checks = 0, failures = 0;
  int n_hold = 0, n_stall = 0, n_snr = 0, exp_pp_corr = 0, n_pp_corr = 0;
  longint sum_errs = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (dut.u_dec.stall_o) n_stall++;

  task automatic set_sigma(real sigma);
    real m = 2.0 / (sigma * sigma) * 4.0;      // mean LLR in LSBs (2 fraction bits)
    real s = 2.0 / sigma * 4.0;                // LLR standard deviation in LSBs
    llr_mean  = 16'(int'(m * 256.0));
    llr_scale = 16'(int'(s / 209.0 * 65536.0));
    n_snr++;
  endtask

  // Host: run frames, service every failure by reading back the trace.
  task automatic run(int nframes, int limit, int pp_limit, int exp_iters_on_fail);
    frame_limit   = nframes;
    iter_limit    = 8'(limit);
    pp_iter_limit = 8'(pp_limit);
    exp_pp_corr   = 0;
    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    while (running) begin
      @(negedge clk);
      if (fail_pending) begin
        int cnt = 0, slot;
        n_hold++;
        slot = int'(last_iters) % 16;
        for (int b = 0; b < DELTA; b++)
          for (int j = 0; j < RHO; j++)
            if (sram[slot * 64 + b][j*AW + AW - 1]) cnt++;
        err_idx = 4'(slot);
        #1;
        check(int'(err_cnt) == cnt, $sformatf("trace count %0d vs counter %0d", cnt, err_cnt));
        sum_errs += cnt;
        check(bit_errs == 48'(sum_errs), "bit error total");
        check(pp_frames == frame_errs, "every failed frame post-processed");
        if (pp_last_errs == '0) exp_pp_corr++;
        check(int'(pp_corrected) == exp_pp_corr, "post-processing correction count");
        check(int'(pp_last_iters) >= 1 && int'(pp_last_iters) <= pp_limit, "wide decoder iterations");
        if (exp_iters_on_fail > 0)
          check(int'(last_iters) == exp_iters_on_fail, "failed frame ran to the limit");
        repeat (3) @(negedge clk);
        check(fail_pending, "platform waits for the host");
        ack = 1;
        @(negedge clk) ack = 0;
      end
    end
    check(int'(frames) == nframes, $sformatf("frames %0d exp %0d", frames, nframes));
  endtask

  initial begin
    host_start = 0; host_stop = 0; ack = 0; seed_load = 0; seed = 32'h5EED;
    iter_limit = 20; pp_iter_limit = 20; frame_limit = 0; err_idx = 0;
    set_sigma(0.487);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) seed_load = 1;
    @(negedge clk) seed_load = 0;

    run(20, 20, 20, 0);
    $display("run A: frames %0d frame errors %0d bit errors %0d converged %0d",
             frames, frame_errs, bit_errs, converged);
    check(converged > 0, "early termination happened");
    check(int'(frame_errs) <= 2, "few frame errors at 4 dB");
    check(converged + frame_errs >= frames, "frames that did not converge failed");

    sum_errs = 0;
    set_sigma(0.8);
    run(3, 5, 5, 5);
    $display("run B: frames %0d frame errors %0d bit errors %0d converged %0d pp corrected %0d",
             frames, frame_errs, bit_errs, converged, pp_corrected);
    check(frame_errs == 3 && converged == 0, "all frames fail at low SNR");
    check(pp_frames == 3 && pp_corrected == 0, "post-processing cannot save them");

    sum_errs = 0;
    set_sigma(0.487);
    run(6, 2, 20, 2);
    $display("run C: frames %0d frame errors %0d converged %0d pp frames %0d pp corrected %0d",
             frames, frame_errs, converged, pp_frames, pp_corrected);
    check(frame_errs > 0, "two iterations are too few for some frames");
    n_pp_corr = int'(pp_corrected);

    // stop request ends a long run after the current frame
    frame_limit = 0; iter_limit = 2;
    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    repeat (100) @(negedge clk);
    host_stop = 1;
    @(negedge clk) host_stop = 0;
    while (running) begin
      @(negedge clk);
      if (fail_pending) begin ack = 1; @(negedge clk) ack = 0; end
    end
    check(frames == 1, "stop after the current frame");

    $display("mechanisms: holds=%0d stall_cycles=%0d snr_updates=%0d sram_writes=%0d pp_corrections=%0d",
             n_hold, n_stall, n_snr, n_sram_writes, n_pp_corr);
    check(n_hold > 0, "hold on failure happened");
    check(n_pp_corr > 0, "post-processing correction happened");
    check(n_stall > 0, "pipeline stall happened");
    check(n_snr > 1, "SNR update happened");
    check(n_sram_writes > 0, "trace writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
