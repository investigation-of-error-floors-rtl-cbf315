// emu_top: LDPC decoder hardware emulation platform.
//
// Measures the error rate of the structured LDPC decoder far below what
// software simulation reaches. The on-chip noise generator produces the
// channel LLRs of an all-zeros codeword, the decoder decodes the frame, and
// the platform counts frames, frame errors and bit errors (a decoded 1 is a
// bit error). The soft decisions of the final iterations go to an external
// static memory; when a frame fails the platform stops before the next
// frame (fail_pending_o) until the host, which reads the memory, answers
// with ack_i. The embedded processor that drives the host_* ports, the
// serial link to the user terminal and the static memory chip are outside
// this module.
//
// Post-processing: a second decoder with a longer wordlength (W_PP = 8,
// FRAC_PP = 3) decodes the same channel realization, quantized finer by the
// noise generator, with its own iteration limit pp_iter_limit_i. It runs
// side by side with the main decoder on every frame, and for every frame
// the main decoder fails the platform records whether the wider decoder
// corrected it (pp_frames_o, pp_corrected_o, pp_last_errs_o,
// pp_last_iters_o). This separates errors caused by the short wordlength
// (corrected) from those the code itself causes (not corrected). A frame
// ends when both decoders are done.
//
// Host interface (all plain signals): host_start_i starts a run of
// frame_limit_i frames (0 = until host_stop_i, which ends the run after the
// current frame); iter_limit_i, llr_mean_i, llr_scale_i and seed_* set the
// iteration limit and the SNR ("SNR update") and are sampled continuously.
// Per-iteration error counts of the last frame are read through
// err_idx_i/err_cnt_o. Frame timing: one cycle to start the decoder, then
// the decoder's own timing (see decoder_ctrl), then one cycle to book the
// result. The block set and their connections follow the platform
// description; the host interface, the counters and the hold-on-failure
// protocol are this design's choice, as is running the post-processing
// decoder alongside the main one instead of re-decoding after a failure
// (the result for a failed frame is the same).
module emu_top
  import ldpc_pkg::ITW, ldpc_pkg::phase_t;
#(
  parameter int unsigned W     = ldpc_pkg::W_DEF,
  parameter int unsigned FRAC  = ldpc_pkg::FRAC_DEF,
  parameter int unsigned DELTA = ldpc_pkg::DELTA,
  parameter int unsigned GAMMA = ldpc_pkg::GAMMA,
  parameter int unsigned RHO   = ldpc_pkg::RHO,
  parameter int unsigned TRACE_DEPTH = 16,
  parameter int unsigned W_PP  = 8,
  parameter int unsigned FRAC_PP = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host control
  input  logic                     host_start_i,
  input  logic                     host_stop_i,
  input  logic                     ack_i,
  input  logic [ITW-1:0]           iter_limit_i,
  input  logic [ITW-1:0]           pp_iter_limit_i,
  input  logic [31:0]              frame_limit_i,
  input  logic                     seed_load_i,
  input  logic [31:0]              seed_i,
  input  logic [15:0]              llr_mean_i,
  input  logic [15:0]              llr_scale_i,
  // host status
  output logic                     running_o,
  output logic                     fail_pending_o,
  output logic [31:0]              frames_o,
  output logic [31:0]              frame_errs_o,
  output logic [47:0]              bit_errs_o,
  output logic [31:0]              converged_o,   // frames ended by all checks satisfied
  output logic [ITW-1:0]           last_iters_o,  // iterations used by the last frame
  output logic [31:0]              pp_frames_o,    // failed frames post-processed
  output logic [31:0]              pp_corrected_o, // of those, decoded by the wide decoder
  output logic [$clog2(RHO*DELTA+1)-1:0] pp_last_errs_o, // wide decoder's errors, last frame
  output logic [ITW-1:0]           pp_last_iters_o,
  input  logic [$clog2(TRACE_DEPTH)-1:0] err_idx_i,
  output logic [$clog2(RHO*DELTA+1)-1:0] err_cnt_o,
  // external static memory (error traces)
  output logic                     sram_we_o,
  output logic [$clog2(TRACE_DEPTH)+$clog2(DELTA)-1:0] sram_addr_o,
  output logic [RHO*(W+$clog2(GAMMA+1))-1:0]           sram_wdata_o
);
  localparam int unsigned DW = $clog2(DELTA);
  localparam int unsigned AW = W + $clog2(GAMMA + 1);
  localparam int unsigned CW = $clog2(RHO*DELTA+1);
  localparam int unsigned AWP = W_PP + $clog2(GAMMA + 1);

  typedef enum logic [2:0] {E_IDLE, E_START, E_RUN, E_BOOK, E_HOLD} emu_state_t;
  emu_state_t state;

  logic                   dec_start, dec_ready, dec_busy, dec_done, dec_conv, dec_stall;
  logic [RHO-1:0][W-1:0]  llr;
  logic                   hd_valid;
  logic [ITW-1:0]         hd_iter, dec_iter;
  logic [DW-1:0]          hd_bit;
  logic [RHO-1:0]         hd_dec;
  logic [RHO-1:0][AW-1:0] hd_post;
  phase_t                 dec_phase;
  logic [CW-1:0]          last_cnt;
  logic                   iter_done;
  logic                   stop_req;
  // post-processing decoder
  logic [RHO-1:0][W_PP-1:0] llr_pp;
  logic                     pp_ready, pp_busy, pp_done, pp_conv, pp_stall;
  logic                     pp_hd_valid;
  logic [ITW-1:0]           pp_hd_iter, pp_iter;
  logic [DW-1:0]            pp_hd_bit;
  logic [RHO-1:0]           pp_hd_dec;
  logic [RHO-1:0][AWP-1:0]  pp_hd_post;
  phase_t                   pp_phase;
  logic [CW-1:0]            pp_acc, pp_cnt;
  logic                     main_fin, pp_fin;

  awgn_gen #(.W(W), .RHO(RHO), .W_PP(W_PP), .XFRAC_PP(FRAC_PP - FRAC)) u_awgn (
    .clk, .rst_n, .seed_load_i, .seed_i, .en_i(dec_ready),
    .llr_mean_i, .llr_scale_i, .llr_o(llr), .llr_pp_o(llr_pp));

  ldpc_decoder #(.W(W), .FRAC(FRAC), .DELTA(DELTA), .GAMMA(GAMMA), .RHO(RHO)) u_dec (
    .clk, .rst_n, .start_i(dec_start), .stop_i(1'b0), .iter_limit_i,
    .llr_valid_i(1'b1), .llr_ready_o(dec_ready), .llr_i(llr),
    .hd_valid_o(hd_valid), .hd_iter_o(hd_iter), .hd_bit_o(hd_bit),
    .hd_dec_o(hd_dec), .hd_post_o(hd_post),
    .busy_o(dec_busy), .done_o(dec_done), .converged_o(dec_conv),
    .stall_o(dec_stall), .phase_o(dec_phase), .iter_o(dec_iter));

  ldpc_decoder #(.W(W_PP), .FRAC(FRAC_PP), .DELTA(DELTA), .GAMMA(GAMMA), .RHO(RHO)) u_pp (
    .clk, .rst_n, .start_i(dec_start), .stop_i(1'b0), .iter_limit_i(pp_iter_limit_i),
    .llr_valid_i(1'b1), .llr_ready_o(pp_ready), .llr_i(llr_pp),
    .hd_valid_o(pp_hd_valid), .hd_iter_o(pp_hd_iter), .hd_bit_o(pp_hd_bit),
    .hd_dec_o(pp_hd_dec), .hd_post_o(pp_hd_post),
    .busy_o(pp_busy), .done_o(pp_done), .converged_o(pp_conv),
    .stall_o(pp_stall), .phase_o(pp_phase), .iter_o(pp_iter));

`ifndef SYNTHESIS
  // Both decoders start together and take their priors in the same cycles.
  a_pp_load: assert property (@(posedge clk) disable iff (!rst_n) pp_ready == dec_ready);
`endif

  // Hard-decision ones of the wide decoder in its latest iteration.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_acc <= '0;
      pp_cnt <= '0;
    end else if (pp_hd_valid) begin
      logic [CW-1:0] sum;
      sum = (pp_hd_bit == '0) ? CW'($countones(pp_hd_dec))
                              : pp_acc + CW'($countones(pp_hd_dec));
      pp_acc <= sum;
      if (pp_hd_bit == DW'(DELTA - 1)) pp_cnt <= sum;
    end
  end

  trace_writer #(.W(W), .DELTA(DELTA), .GAMMA(GAMMA), .RHO(RHO), .DEPTH(TRACE_DEPTH)) u_trace (
    .clk, .rst_n, .hd_valid_i(hd_valid), .hd_iter_i(hd_iter), .hd_bit_i(hd_bit),
    .hd_dec_i(hd_dec), .hd_post_i(hd_post),
    .sram_we_o, .sram_addr_o, .sram_wdata_o,
    .cnt_idx_i(err_idx_i), .cnt_o(err_cnt_o), .last_cnt_o(last_cnt),
    .iter_done_o(iter_done));

  assign dec_start = (state == E_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= E_IDLE;
      stop_req     <= 1'b0;
      frames_o     <= '0;
      frame_errs_o <= '0;
      bit_errs_o   <= '0;
      converged_o  <= '0;
      last_iters_o <= '0;
      pp_frames_o     <= '0;
      pp_corrected_o  <= '0;
      pp_last_errs_o  <= '0;
      pp_last_iters_o <= '0;
      main_fin        <= 1'b0;
      pp_fin          <= 1'b0;
    end else begin
      if (host_stop_i) stop_req <= 1'b1;
      case (state)
        E_IDLE: if (host_start_i) begin
          state        <= E_START;
          stop_req     <= 1'b0;
          frames_o     <= '0;
          frame_errs_o <= '0;
          bit_errs_o   <= '0;
          converged_o  <= '0;
          pp_frames_o    <= '0;
          pp_corrected_o <= '0;
        end
        E_START: begin
          state    <= E_RUN;
          main_fin <= 1'b0;
          pp_fin   <= 1'b0;
        end
        E_RUN: begin
          if (dec_done) begin
            main_fin     <= 1'b1;
            last_iters_o <= dec_iter;
            if (dec_conv) converged_o <= converged_o + 1'b1;
          end
          if (pp_done) begin
            pp_fin          <= 1'b1;
            pp_last_iters_o <= pp_iter;
          end
          if ((main_fin || dec_done) && (pp_fin || pp_done)) state <= E_BOOK;
        end
        E_BOOK: begin
          frames_o <= frames_o + 1'b1;
          if (last_cnt != '0) begin
            frame_errs_o <= frame_errs_o + 1'b1;
            bit_errs_o   <= bit_errs_o + 48'(last_cnt);
            pp_frames_o  <= pp_frames_o + 1'b1;
            pp_last_errs_o <= pp_cnt;
            if (pp_cnt == '0) pp_corrected_o <= pp_corrected_o + 1'b1;
            state        <= E_HOLD;
          end else if (stop_req || (frame_limit_i != '0 && frames_o + 1'b1 >= frame_limit_i)) begin
            state <= E_IDLE;
          end else begin
            state <= E_START;
          end
        end
        E_HOLD: if (ack_i) begin
          if (stop_req || (frame_limit_i != '0 && frames_o >= frame_limit_i)) state <= E_IDLE;
          else                                                               state <= E_START;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  assign running_o      = (state != E_IDLE);
  assign fail_pending_o = (state == E_HOLD);
endmodule
