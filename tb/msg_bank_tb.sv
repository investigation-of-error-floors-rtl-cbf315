// msg_bank_tb: random single-lane and all-lane writes against a shadow
// array, with reads checked one cycle after their address (synchronous read).
module msg_bank_tb;
  localparam int WIDTH = 7, DELTA = 64, GAMMA = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we, wall;
  logic [5:0] waddr, raddr;
  logic [2:0] wlane, rlane;
  logic [WIDTH-1:0] wdata, rdata;
  msg_bank #(.WIDTH(WIDTH)) dut (.clk, .we_i(we), .wall_i(wall), .waddr_i(waddr),
    .wlane_i(wlane), .wdata_i(wdata), .raddr_i(raddr), .rlane_i(rlane), .rdata_o(rdata));

  int checks = 0, failures = 0, n_wall = 0;
  logic [WIDTH-1:0] shadow [DELTA][GAMMA];
  logic [WIDTH-1:0] expq;
  bit pend;

  initial begin
    we = 0; wall = 0; waddr = 0; wlane = 0; wdata = 0; raddr = 0; rlane = 0; pend = 0;
    // fill everything with all-lane writes first
    for (int a = 0; a < DELTA; a++) begin
      @(negedge clk);
      we = 1; wall = 1; waddr = 6'(a); wdata = WIDTH'($urandom);
      for (int l = 0; l < GAMMA; l++) shadow[a][l] = wdata;
      n_wall++;
    end
    @(negedge clk) we = 0; wall = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expq) begin
          failures++;
          if (failures < 10) $display("FAIL read got %h exp %h", rdata, expq);
        end
      end
      raddr = 6'($urandom % DELTA);
      rlane = 3'($urandom % GAMMA);
      expq  = shadow[raddr][rlane];           // read sees the old data
      pend  = 1;
      we    = ($urandom % 2) == 1;
      wall  = ($urandom % 8) == 0;
      waddr = 6'($urandom % DELTA);
      wlane = 3'($urandom % GAMMA);
      wdata = WIDTH'($urandom);
      if (we) begin
        if (wall) n_wall++;
        for (int l = 0; l < GAMMA; l++)
          if (wall || l == int'(wlane)) shadow[waddr][l] = wdata;
      end
    end
    checks++;
    if (n_wall == 0) failures++;
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
