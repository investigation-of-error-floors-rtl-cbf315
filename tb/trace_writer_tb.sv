// trace_writer_tb: feeds decoder-style output bursts (64 strobes of 32
// posteriors per iteration, one strobe every 6 cycles) for 20 iterations
// and checks every memory write (address {iteration mod 16, bit}, data the
// posteriors, one cycle later), the per-iteration error counts in the ring
// (only the last 16 iterations survive) and the latest count.
module trace_writer_tb;
  localparam int W = 6, DELTA = 64, GAMMA = 6, RHO = 32, AW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic hd_valid, sram_we, iter_done;
  logic [7:0] hd_iter;
  logic [5:0] hd_bit;
  logic [RHO-1:0] hd_dec;
  logic [RHO-1:0][AW-1:0] hd_post;
  logic [9:0] sram_addr;
  logic [RHO*AW-1:0] sram_wdata;
  logic [3:0] cnt_idx;
  logic [11:0] cnt, last_cnt;

  trace_writer dut (.clk, .rst_n, .hd_valid_i(hd_valid), .hd_iter_i(hd_iter), .hd_bit_i(hd_bit),
    .hd_dec_i(hd_dec), .hd_post_i(hd_post), .sram_we_o(sram_we), .sram_addr_o(sram_addr),
    .sram_wdata_o(sram_wdata), .cnt_idx_i(cnt_idx), .cnt_o(cnt), .last_cnt_o(last_cnt),
    .iter_done_o(iter_done));

  int checks = 0, failures = 0, n_writes = 0;
  int errs [21];
  logic [RHO*AW-1:0] exp_data;
  int exp_addr;
  bit pend = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && sram_we) n_writes++;

  initial begin
    hd_valid = 0; hd_iter = 0; hd_bit = 0; hd_dec = 0; hd_post = 0; cnt_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 1; it <= 20; it++) begin
      errs[it] = 0;
      for (int b = 0; b < DELTA; b++) begin
        for (int s = 0; s < 6; s++) begin
          @(negedge clk);
          if (pend) begin
            check(sram_we && int'(sram_addr) == exp_addr && sram_wdata == exp_data, "memory write");
            pend = 0;
          end else check(!sram_we, "no stray write");
          hd_valid = (s == 0);
          if (s == 0) begin
            hd_iter = 8'(it); hd_bit = 6'(b);
            for (int j = 0; j < RHO; j++) begin
              int p = int'($urandom % 200) - 100 + (it % 3) * 40;
              hd_post[j] = AW'(p);
              hd_dec[j]  = p < 0;
              errs[it] += (p < 0);
            end
            exp_addr = (it % 16) * 64 + b;
            exp_data = hd_post;
            pend = 1;
          end
        end
      end
      @(negedge clk);
      hd_valid = 0;
      check(int'(last_cnt) == errs[it], $sformatf("latest count %0d exp %0d", last_cnt, errs[it]));
    end
    for (int it = 5; it <= 20; it++) begin
      cnt_idx = 4'(it % 16);
      #1;
      check(int'(cnt) == errs[it], $sformatf("ring count iter %0d: %0d exp %0d", it, cnt, errs[it]));
    end
    check(n_writes == 20 * DELTA, "number of memory writes");
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
