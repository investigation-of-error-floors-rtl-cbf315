// ldpc_decoder: parallel-serial decoder for structured LDPC codes whose
// parity-check matrix is a GAMMA x RHO array of DELTA x DELTA permutation
// matrices; by default the (6,32)-regular (2048,1723) RS-LDPC code.
//
// RHO processing units each own one column group (DELTA bits). A single
// check node combines one message from every unit per cycle, so the
// check-to-bit operation walks the M = GAMMA*DELTA checks in M cycles; the
// bit nodes inside the units consume their messages serially, GAMMA per bit,
// so the bit-to-check operation also takes M cycles. Only the check node sum
// and sign are global wires; all marginalization is local to the units.
//
// Interface: pulse start_i, then supply DELTA words of RHO priors
// (llr_i[j] is bit DELTA*j + k of the frame in the k-th accepted word,
// W-bit sign-magnitude, positive favours 0) with llr_valid_i/llr_ready_o.
// At the end of every bit-to-check operation hd_valid_o marks, once per
// local bit index hd_bit_o, the posterior LLRs and hard decisions of the
// RHO bits DELTA*j + hd_bit_o, tagged with the iteration hd_iter_o; the
// last such burst before done_o is the decoder output. converged_o tells
// whether the frame ended because every check was satisfied. stall_o and
// phase_o expose the sequencing. Latencies are given in decoder_ctrl and
// proc_unit.
module ldpc_decoder
  import ldpc_pkg::ITW, ldpc_pkg::phase_t;
#(
  parameter int unsigned W     = ldpc_pkg::W_DEF,
  parameter int unsigned FRAC  = ldpc_pkg::FRAC_DEF,
  parameter int unsigned DELTA = ldpc_pkg::DELTA,
  parameter int unsigned GAMMA = ldpc_pkg::GAMMA,
  parameter int unsigned RHO   = ldpc_pkg::RHO
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start_i,
  input  logic                        stop_i,
  input  logic [ITW-1:0]              iter_limit_i,
  input  logic                        llr_valid_i,
  output logic                        llr_ready_o,
  input  logic [RHO-1:0][W-1:0]       llr_i,
  output logic                        hd_valid_o,
  output logic [ITW-1:0]              hd_iter_o,
  output logic [$clog2(DELTA)-1:0]    hd_bit_o,
  output logic [RHO-1:0]              hd_dec_o,
  output logic [RHO-1:0][W+$clog2(GAMMA+1)-1:0] hd_post_o,
  output logic                        busy_o,
  output logic                        done_o,
  output logic                        converged_o,
  output logic                        stall_o,
  output phase_t                      phase_o,
  output logic [ITW-1:0]              iter_o
);
  localparam int unsigned DW = $clog2(DELTA);
  localparam int unsigned GW = $clog2(GAMMA);
  localparam int unsigned MW = W - 1;
  localparam int unsigned SW = MW + $clog2(RHO);
  localparam int unsigned AW = W + $clog2(GAMMA + 1);

  logic          load_en, c2b_en, b2c_en;
  logic [DW-1:0] load_bit, c2b_row, b2c_bit;
  logic [GW-1:0] c2b_lane, b2c_lane;
  logic          cn_valid, cn_sgn, cn_par;
  logic [SW-1:0] cn_sum;

  logic [RHO-1:0]         pu_cn_valid, pu_sgn, pu_dec, pu_pvalid, pu_hd;
  logic [RHO-1:0][MW-1:0] pu_phi;
  logic [RHO-1:0][DW-1:0] pu_pbit;
  logic [RHO-1:0][AW-1:0] pu_post;

  decoder_ctrl #(.DELTA(DELTA), .GAMMA(GAMMA), .C2B_LAT(3), .B2C_LAT(GAMMA + 2)) u_ctrl (
    .clk, .rst_n, .start_i, .stop_i, .iter_limit_i,
    .llr_valid_i, .llr_ready_o,
    .load_en_o(load_en), .load_bit_o(load_bit),
    .c2b_en_o(c2b_en), .c2b_lane_o(c2b_lane), .c2b_row_o(c2b_row),
    .b2c_en_o(b2c_en), .b2c_bit_o(b2c_bit), .b2c_lane_o(b2c_lane),
    .par_valid_i(cn_valid), .par_i(cn_par),
    .phase_o, .iter_o, .busy_o, .stall_o, .done_o, .converged_o);

  for (genvar j = 0; j < RHO; j++) begin : g_pu
    proc_unit #(.W(W), .FRAC(FRAC), .DELTA(DELTA), .GAMMA(GAMMA), .RHO(RHO), .UNIT(j)) u_pu (
      .clk, .rst_n, .flush_i(stop_i),
      .load_en_i(load_en), .load_bit_i(load_bit), .load_llr_i(llr_i[j]),
      .c2b_en_i(c2b_en), .c2b_lane_i(c2b_lane), .c2b_row_i(c2b_row),
      .cn_valid_o(pu_cn_valid[j]), .cn_phi_o(pu_phi[j]), .cn_sgn_o(pu_sgn[j]),
      .cn_dec_o(pu_dec[j]),
      .cn_valid_i(cn_valid), .cn_sum_i(cn_sum), .cn_sgn_i(cn_sgn),
      .b2c_en_i(b2c_en), .b2c_bit_i(b2c_bit), .b2c_lane_i(b2c_lane),
      .post_valid_o(pu_pvalid[j]), .post_bit_o(pu_pbit[j]), .post_o(pu_post[j]),
      .dec_o(pu_hd[j]));
  end

  check_node #(.RHO(RHO), .MW(MW)) u_cn (
    .clk, .rst_n,
    .valid_i(pu_cn_valid[0]), .phi_i(pu_phi), .sgn_i(pu_sgn), .dec_i(pu_dec),
    .valid_o(cn_valid), .sum_o(cn_sum), .sgn_o(cn_sgn), .parity_o(cn_par));

  // All units run in lock step; unit 0's strobes stand for all of them.
  assign hd_valid_o = pu_pvalid[0];
  assign hd_bit_o   = pu_pbit[0];
  assign hd_iter_o  = iter_o;
  assign hd_dec_o   = pu_hd;
  assign hd_post_o  = pu_post;

`ifndef SYNTHESIS
  // The units must never disagree about what they are doing.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (pu_cn_valid == '0 || pu_cn_valid == '1) && (pu_pvalid == '0 || pu_pvalid == '1));
`endif
endmodule
