// proc_unit: one of the RHO processing units of the parallel-serial decoder.
//
// Unit UNIT handles column group UNIT, i.e. DELTA code bits. It owns a bank
// of M0 (bit-to-check messages, each with the hard decision of its bit), a
// bank of M1 (check-to-bit messages in Phi-domain sign-magnitude form), the
// address lookup table, two Phi tables, the local check-side
// marginalization and a serial bit node, plus a DELTA-word buffer holding
// the bit priors (the channel output path to the bit node).
//
// Load (load_en_i): the prior of bit load_bit_i goes to the prior buffer and
//   to all GAMMA lanes of M0, with its sign as first decision.
// Check-to-bit, one check per cycle (c2b_en_i, check (lane g, row r)):
//   cycle 0  the LUT gives bit c; M0 word (c, g) is read
//   cycle 1  Phi(|Q|) registered; cycle 2 it is on cn_*_o to the check node
//   cycle 3  the check node's sum S and sign product return; the unit writes
//            M1(c, g) = {sign product XOR own sign, sat(S - own Phi)}
// Bit-to-check, one edge per cycle in storage order (b2c_en_i, bit b, lane g):
//   cycle 0  M1(b, g) read; cycle 1 R = +-Phi(|m|) registered;
//   cycle 2  into the bit node; cycle 8 Q for (b, g) written to M0.
// After the last issue of a phase the pipeline needs C2B_LAT = 3 or
// B2C_LAT = GAMMA + 2 further cycles before the other phase may read the
// memory just written; the controller inserts that stall. flush_i (frame
// abort) drops every message still in the pipelines. post_valid_o
// marks, once per bit, the posterior and hard decision of bit post_bit_o.
// The division of work follows the decoder description; the pipeline
// depths, the sign-magnitude storage and the saturation are this design's.
module proc_unit #(
  parameter int unsigned W     = ldpc_pkg::W_DEF,
  parameter int unsigned FRAC  = ldpc_pkg::FRAC_DEF,
  parameter int unsigned DELTA = ldpc_pkg::DELTA,
  parameter int unsigned GAMMA = ldpc_pkg::GAMMA,
  parameter int unsigned RHO   = ldpc_pkg::RHO,
  parameter int unsigned UNIT  = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush_i,      // abort: drop work in flight
  // loading of the priors
  input  logic                     load_en_i,
  input  logic [$clog2(DELTA)-1:0] load_bit_i,
  input  logic [W-1:0]             load_llr_i,   // sign-magnitude
  // check-to-bit issue
  input  logic                     c2b_en_i,
  input  logic [$clog2(GAMMA)-1:0] c2b_lane_i,
  input  logic [$clog2(DELTA)-1:0] c2b_row_i,
  // to the check node
  output logic                     cn_valid_o,
  output logic [W-2:0]             cn_phi_o,
  output logic                     cn_sgn_o,
  output logic                     cn_dec_o,
  // from the check node
  input  logic                     cn_valid_i,
  input  logic [W-2+$clog2(RHO):0] cn_sum_i,
  input  logic                     cn_sgn_i,
  // bit-to-check issue
  input  logic                     b2c_en_i,
  input  logic [$clog2(DELTA)-1:0] b2c_bit_i,
  input  logic [$clog2(GAMMA)-1:0] b2c_lane_i,
  // hard decision output
  output logic                     post_valid_o,
  output logic [$clog2(DELTA)-1:0] post_bit_o,
  output logic signed [W+$clog2(GAMMA+1)-1:0] post_o,
  output logic                     dec_o
);
  localparam int unsigned DW = $clog2(DELTA);
  localparam int unsigned GW = $clog2(GAMMA);
  localparam int unsigned MW = W - 1;
  localparam int unsigned SW = MW + $clog2(RHO);
  localparam int unsigned AW = W + $clog2(GAMMA + 1);

  // ---------------- memories ----------------
  logic          m0_we, m0_wall;
  logic [DW-1:0] m0_waddr, m0_raddr;
  logic [GW-1:0] m0_wlane;
  logic [W:0]    m0_wdata, m0_rdata;           // {decision, sign, magnitude}
  logic          m1_we;
  logic [DW-1:0] m1_waddr;
  logic [GW-1:0] m1_wlane;
  logic [W-1:0]  m1_wdata, m1_rdata;           // {sign, Phi-domain magnitude}

  msg_bank #(.WIDTH(W+1), .DELTA(DELTA), .GAMMA(GAMMA)) u_m0 (
    .clk, .we_i(m0_we), .wall_i(m0_wall), .waddr_i(m0_waddr), .wlane_i(m0_wlane),
    .wdata_i(m0_wdata), .raddr_i(m0_raddr), .rlane_i(c2b_lane_i), .rdata_o(m0_rdata));

  msg_bank #(.WIDTH(W), .DELTA(DELTA), .GAMMA(GAMMA)) u_m1 (
    .clk, .we_i(m1_we), .wall_i(1'b0), .waddr_i(m1_waddr), .wlane_i(m1_wlane),
    .wdata_i(m1_wdata), .raddr_i(b2c_bit_i), .rlane_i(b2c_lane_i), .rdata_o(m1_rdata));

  logic [W-1:0] prior_mem [DELTA];
  always_ff @(posedge clk)
    if (load_en_i) prior_mem[load_bit_i] <= load_llr_i;

  // ---------------- check-to-bit pipeline ----------------
  addr_lut #(.DELTA(DELTA), .GAMMA(GAMMA), .UNIT(UNIT)) u_lut (
    .lane_i(c2b_lane_i), .row_i(c2b_row_i), .bit_o(m0_raddr));

  logic          s1_valid, s2_valid;
  logic [DW-1:0] s1_bit, s2_bit, s3_bit;
  logic [GW-1:0] s1_lane, s2_lane, s3_lane;
  logic [MW-1:0] s2_phi, s3_phi, phi_q;
  logic          s2_sgn, s3_sgn, s2_dec;

  phi_lut #(.W(W), .FRAC(FRAC)) u_phi_q (.mag_i(m0_rdata[MW-1:0]), .phi_o(phi_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s2_valid <= 1'b0;
      s1_bit <= '0; s1_lane <= '0;
      s2_bit <= '0; s2_lane <= '0; s2_phi <= '0; s2_sgn <= 1'b0; s2_dec <= 1'b0;
      s3_bit <= '0; s3_lane <= '0; s3_phi <= '0; s3_sgn <= 1'b0;
    end else begin
      s1_valid <= c2b_en_i;
      s1_bit   <= m0_raddr;
      s1_lane  <= c2b_lane_i;
      s2_valid <= s1_valid;
      s2_bit   <= s1_bit;
      s2_lane  <= s1_lane;
      s2_phi   <= phi_q;
      s2_sgn   <= m0_rdata[W-1];
      s2_dec   <= m0_rdata[W];
      s3_bit   <= s2_bit;
      s3_lane  <= s2_lane;
      s3_phi   <= s2_phi;
      s3_sgn   <= s2_sgn;
      if (flush_i) begin
        s1_valid <= 1'b0;
        s2_valid <= 1'b0;
      end
    end
  end

  assign cn_valid_o = s2_valid;
  assign cn_phi_o   = s2_phi;
  assign cn_sgn_o   = s2_sgn;
  assign cn_dec_o   = s2_dec;

  // Local marginalization: remove this unit's own term from the global sum.
  logic [SW-1:0] marg;
  always_comb begin
    marg     = cn_sum_i - SW'(s3_phi);
    m1_we    = cn_valid_i;
    m1_waddr = s3_bit;
    m1_wlane = s3_lane;
    m1_wdata = {cn_sgn_i ^ s3_sgn,
                (marg > SW'(2**MW - 1)) ? MW'(2**MW - 1) : marg[MW-1:0]};
  end

  // ---------------- bit-to-check pipeline ----------------
  logic                t1_valid, t2_valid;
  logic [DW-1:0]       t1_bit, t2_bit;
  logic [GW-1:0]       t1_lane, t2_lane;
  logic signed [W-1:0] t2_r;
  logic [MW-1:0]       phi_r;

  phi_lut #(.W(W), .FRAC(FRAC)) u_phi_r (.mag_i(m1_rdata[MW-1:0]), .phi_o(phi_r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_valid <= 1'b0; t2_valid <= 1'b0;
      t1_bit <= '0; t1_lane <= '0; t2_bit <= '0; t2_lane <= '0; t2_r <= '0;
    end else begin
      t1_valid <= b2c_en_i;
      t1_bit   <= b2c_bit_i;
      t1_lane  <= b2c_lane_i;
      t2_valid <= t1_valid;
      t2_bit   <= t1_bit;
      t2_lane  <= t1_lane;
      t2_r     <= m1_rdata[W-1] ? -$signed({1'b0, phi_r}) : $signed({1'b0, phi_r});
      if (flush_i) begin
        t1_valid <= 1'b0;
        t2_valid <= 1'b0;
      end
    end
  end

  logic [W-1:0]        prior_sm;
  logic signed [W-1:0] prior_tc;
  always_comb begin
    prior_sm = prior_mem[t2_bit];
    prior_tc = prior_sm[W-1] ? -$signed({1'b0, prior_sm[MW-1:0]})
                             :  $signed({1'b0, prior_sm[MW-1:0]});
  end

  logic                bn_valid, bn_dec;
  logic [DW-1:0]       bn_bit;
  logic [GW-1:0]       bn_lane;
  logic [W-1:0]        bn_q;
  logic signed [AW-1:0] bn_post;

  bit_node #(.W(W), .DELTA(DELTA), .GAMMA(GAMMA)) u_bn (
    .clk, .rst_n, .flush_i,
    .in_valid_i(t2_valid), .in_bit_i(t2_bit), .in_lane_i(t2_lane),
    .in_r_i(t2_r), .prior_i(prior_tc),
    .out_valid_o(bn_valid), .out_bit_o(bn_bit), .out_lane_o(bn_lane),
    .out_q_o(bn_q), .out_dec_o(bn_dec), .out_post_o(bn_post));

  // M0 write: priors while loading, bit-to-check messages otherwise.
  always_comb begin
    if (load_en_i) begin
      m0_we    = 1'b1;
      m0_wall  = 1'b1;
      m0_waddr = load_bit_i;
      m0_wlane = '0;
      m0_wdata = {load_llr_i[W-1], load_llr_i};
    end else begin
      m0_we    = bn_valid;
      m0_wall  = 1'b0;
      m0_waddr = bn_bit;
      m0_wlane = bn_lane;
      m0_wdata = {bn_dec, bn_q};
    end
  end

  assign post_valid_o = bn_valid && (bn_lane == '0);
  assign post_bit_o   = bn_bit;
  assign post_o       = bn_post;
  assign dec_o        = bn_dec;
endmodule
