// awgn_gen: on-chip Gaussian noise source that produces channel LLRs.
//
// The emulation transmits the all-zeros codeword with BPSK (0 -> +1) over
// an AWGN channel, so every received LLR is 2/sigma^2 * (1 + sigma*n) with n
// standard normal. Each of the RHO lanes (one per processing unit) has its
// own 64-bit xorshift generator; the sum of the eight bytes of its state,
// minus their mean 1020, approximates a normal variable by the central
// limit theorem (standard deviation 209 raw units, range +-1020). The host
// sets the signal-to-noise ratio through two numbers:
//   llr_mean_i   mean LLR 2/sigma^2 in output LSBs, 8 fraction bits
//   llr_scale_i  LLR standard deviation per raw noise unit, 16 fraction bits
//                (2/sigma in output LSBs divided by 209)
// llr_o = round(llr_mean + llr_scale*n) saturated to W-bit sign-magnitude,
// a combinational function of the current state. llr_pp_o is the same
// channel sample quantized for the post-processing decoder, with XFRAC_PP
// more fraction bits and W_PP bits, so both decoders see one channel
// realization. Asserting en_i advances every lane to its next sample;
// seed_load_i re-seeds all lanes from seed_i. Only the presence of an
// on-chip AWGN generator follows the published platform; the generator
// type, the seeding, the SNR encoding and the second quantization are this
// design's choice.
module awgn_gen #(
  parameter int unsigned W   = ldpc_pkg::W_DEF,
  parameter int unsigned RHO = ldpc_pkg::RHO,
  parameter int unsigned W_PP     = W + 2,
  parameter int unsigned XFRAC_PP = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  seed_load_i,
  input  logic [31:0]           seed_i,
  input  logic                  en_i,
  input  logic [15:0]           llr_mean_i,
  input  logic [15:0]           llr_scale_i,
  output logic [RHO-1:0][W-1:0] llr_o,
  output logic [RHO-1:0][W_PP-1:0] llr_pp_o
);
  localparam int MAXMAG    = 2**(W-1) - 1;
  localparam int MAXMAG_PP = 2**(W_PP-1) - 1;

  // Round the Q.16 value acc >> (16 - xfrac) and saturate to maxmag;
  // returns sign-magnitude with the sign in bit 20.
  function automatic logic [20:0] quant(logic signed [35:0] acc, int unsigned xfrac,
                                        int unsigned maxmag);
    logic signed [35:0] r;
    logic        [35:0] mag;
    r   = (acc + (36'sd32768 >>> xfrac)) >>> (16 - xfrac);
    mag = r[35] ? 36'(-r) : 36'(r);
    if (mag > 36'(maxmag)) mag = 36'(maxmag);
    return {r[35] && (mag != '0), mag[19:0]};
  endfunction

  logic [RHO-1:0][63:0] st;

  function automatic logic [63:0] seed_of(logic [31:0] s, int unsigned lane);
    return {s ^ (32'h9E3779B9 * (lane + 1)), 32'h6A09E667 + 32'(lane)};
  endfunction

  function automatic logic [63:0] xorshift(logic [63:0] x);
    logic [63:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 7);
    y = y ^ (y << 17);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RHO; i++) st[i] <= seed_of(32'h1, i);
    end else if (seed_load_i) begin
      for (int i = 0; i < RHO; i++) st[i] <= seed_of(seed_i, i);
    end else if (en_i) begin
      for (int i = 0; i < RHO; i++) st[i] <= xorshift(st[i]);
    end
  end

  always_comb begin
    for (int i = 0; i < RHO; i++) begin
      logic signed [11:0] n;
      logic signed [35:0] acc;
      logic        [20:0] q, qp;
      n = -12'sd1020;
      for (int b = 0; b < 8; b++) n = n + $signed({4'b0, st[i][8*b +: 8]});
      acc = $signed({12'b0, llr_mean_i, 8'b0}) + $signed({1'b0, llr_scale_i}) * n;
      q   = quant(acc, 0, MAXMAG);
      qp  = quant(acc, XFRAC_PP, MAXMAG_PP);
      llr_o[i]    = {q[20], q[W-2:0]};
      llr_pp_o[i] = {qp[20], qp[W_PP-2:0]};
    end
  end
endmodule
