// bit_node: serial bit node of one processing unit.
//
// It receives the GAMMA check-to-bit messages R of a bit one per cycle
// (lane g = 0..GAMMA-1, bits back to back), adds them to the bit's prior LLR
// (taken with lane 0) and so forms the posterior LLR every GAMMA cycles. A
// GAMMA-deep delay line holds the messages; as they leave it, GAMMA cycles
// after they entered, each is subtracted from the posterior of its bit
// (marginalization) to give the bit-to-check message Q = posterior - R,
// saturated to W-bit sign-magnitude. The hard decision is the sign of the
// posterior (1 when negative). While bit k is marginalized, bit k+1 is
// being accumulated, so the node sustains one message per cycle. flush_i
// discards the messages in flight (used when a frame is aborted).
// Timing: the Q for an input arrives GAMMA cycles after that input;
// out_post_o/out_dec_o belong to the bit on the output. Inputs R and prior
// are two's complement; the accumulator has W + log2(GAMMA+1) bits and never
// overflows. Structure (accumulator, FIFO, subtractor) follows the decoder
// description; the widths and the saturation are this design's choice.
module bit_node #(
  parameter int unsigned W     = ldpc_pkg::W_DEF,
  parameter int unsigned DELTA = ldpc_pkg::DELTA,
  parameter int unsigned GAMMA = ldpc_pkg::GAMMA
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush_i,     // drop messages in flight
  input  logic                     in_valid_i,
  input  logic [$clog2(DELTA)-1:0] in_bit_i,
  input  logic [$clog2(GAMMA)-1:0] in_lane_i,
  input  logic signed [W-1:0]      in_r_i,
  input  logic signed [W-1:0]      prior_i,
  output logic                     out_valid_o,
  output logic [$clog2(DELTA)-1:0] out_bit_o,
  output logic [$clog2(GAMMA)-1:0] out_lane_o,
  output logic [W-1:0]             out_q_o,     // sign-magnitude
  output logic                     out_dec_o,
  output logic signed [W+$clog2(GAMMA+1)-1:0] out_post_o
);
  localparam int unsigned DW = $clog2(DELTA);
  localparam int unsigned GW = $clog2(GAMMA);
  localparam int unsigned AW = W + $clog2(GAMMA + 1);
  localparam int MAXMAG = 2**(W-1) - 1;

  typedef struct packed {
    logic                valid;
    logic [DW-1:0]       bitx;
    logic [GW-1:0]       lane;
    logic signed [W-1:0] r;
  } dl_t;

  dl_t                 dl [GAMMA];
  logic signed [AW-1:0] acc, acc_next, post;

  always_comb begin
    if (in_lane_i == '0) acc_next = AW'(prior_i) + AW'(in_r_i);
    else                 acc_next = acc + AW'(in_r_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      post <= '0;
      for (int i = 0; i < GAMMA; i++) dl[i] <= '0;
    end else begin
      if (in_valid_i) begin
        acc <= acc_next;
        if (in_lane_i == GW'(GAMMA - 1)) post <= acc_next;
      end
      dl[0] <= '{valid: in_valid_i, bitx: in_bit_i, lane: in_lane_i, r: in_r_i};
      for (int i = 1; i < GAMMA; i++) dl[i] <= dl[i-1];
      if (flush_i)
        for (int i = 0; i < GAMMA; i++) dl[i].valid <= 1'b0;
    end
  end

  // Marginalization and conversion to saturated sign-magnitude.
  logic signed [AW:0] q;
  logic [AW:0]        qmag;
  always_comb begin
    q    = (AW+1)'(post) - (AW+1)'(dl[GAMMA-1].r);
    qmag = q[AW] ? (AW+1)'(-q) : (AW+1)'(q);
    out_q_o = {q[AW], (qmag > (AW+1)'(MAXMAG)) ? (W-1)'(MAXMAG) : qmag[W-2:0]};
  end

  assign out_valid_o = dl[GAMMA-1].valid;
  assign out_bit_o   = dl[GAMMA-1].bitx;
  assign out_lane_o  = dl[GAMMA-1].lane;
  assign out_dec_o   = post[AW-1];
  assign out_post_o  = post;
endmodule
