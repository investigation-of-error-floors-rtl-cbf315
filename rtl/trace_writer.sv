// trace_writer: records error traces of the decoder for later analysis.
//
// It watches the decoder's per-iteration output bursts (DELTA strobes of
// RHO posteriors each). With the all-zeros codeword transmitted every hard
// decision 1 is a bit error, so it counts the ones of each iteration and
// keeps the counts of the last DEPTH iterations in a ring indexed by
// iteration mod DEPTH (DEPTH a power of two; readable through cnt_idx_i/cnt_o). Every burst is
// also written, one strobe per cycle, to the external static memory:
// address {iteration mod DEPTH, local bit index}, data the RHO soft
// decisions. The memory therefore always holds the soft decisions of the
// last DEPTH iterations of the current frame, which is what is kept when a
// frame fails (the platform then holds off the next frame until the host
// has read it). last_cnt_o is the error count of the latest complete
// iteration. Outputs to the memory are registered (one cycle latency).
// DEPTH = 16 follows the error analysis; the address layout and word
// format are this design's choice.
module trace_writer #(
  parameter int unsigned W     = ldpc_pkg::W_DEF,
  parameter int unsigned DELTA = ldpc_pkg::DELTA,
  parameter int unsigned GAMMA = ldpc_pkg::GAMMA,
  parameter int unsigned RHO   = ldpc_pkg::RHO,
  parameter int unsigned DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        hd_valid_i,
  input  logic [ldpc_pkg::ITW-1:0]    hd_iter_i,
  input  logic [$clog2(DELTA)-1:0]    hd_bit_i,
  input  logic [RHO-1:0]              hd_dec_i,
  input  logic [RHO-1:0][W+$clog2(GAMMA+1)-1:0] hd_post_i,
  // external static memory write port
  output logic                        sram_we_o,
  output logic [$clog2(DEPTH)+$clog2(DELTA)-1:0] sram_addr_o,
  output logic [RHO*(W+$clog2(GAMMA+1))-1:0]     sram_wdata_o,
  // per-iteration bit error counts
  input  logic [$clog2(DEPTH)-1:0]    cnt_idx_i,
  output logic [$clog2(RHO*DELTA+1)-1:0] cnt_o,
  output logic [$clog2(RHO*DELTA+1)-1:0] last_cnt_o,
  output logic                        iter_done_o
);
  localparam int unsigned DW = $clog2(DELTA);
  localparam int unsigned TW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(RHO*DELTA+1);

  logic [CW-1:0] ring [DEPTH];
  logic [CW-1:0] cur, cur_next;
  logic [$clog2(RHO+1)-1:0] pop;

  always_comb begin
    pop = '0;
    for (int i = 0; i < RHO; i++) pop = pop + $clog2(RHO+1)'(hd_dec_i[i]);
    cur_next = ((hd_bit_i == '0) ? '0 : cur) + CW'(pop);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur          <= '0;
      last_cnt_o   <= '0;
      iter_done_o  <= 1'b0;
      sram_we_o    <= 1'b0;
      sram_addr_o  <= '0;
      sram_wdata_o <= '0;
      for (int i = 0; i < DEPTH; i++) ring[i] <= '0;
    end else begin
      iter_done_o <= 1'b0;
      sram_we_o   <= hd_valid_i;
      if (hd_valid_i) begin
        cur          <= cur_next;
        sram_addr_o  <= {hd_iter_i[TW-1:0], hd_bit_i};
        sram_wdata_o <= hd_post_i;
        if (hd_bit_i == DW'(DELTA - 1)) begin
          ring[hd_iter_i[TW-1:0]] <= cur_next;
          last_cnt_o  <= cur_next;
          iter_done_o <= 1'b1;
        end
      end
    end
  end

  assign cnt_o = ring[cnt_idx_i];
endmodule
