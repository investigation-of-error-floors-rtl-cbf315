// addr_lut: M0/M1 address lookup table of one processing unit.
//
// During the check-to-bit operation the check node visits the checks in
// order, row group g = 0..GAMMA-1 and row r = 0..DELTA-1 inside it. For
// processing unit UNIT (column group j) the table returns the local bit
// index c (0..DELTA-1) that check (g, r) is connected to; the message
// lives at bit c, lane g of the unit's banks, i.e. at address c*GAMMA + g
// in the order the bit node consumes them. One entry per check, DELTA*GAMMA
// entries of log2(DELTA) bits. The table is filled at elaboration from the
// parity-check matrix in ldpc_pkg::h_col; refilling it for another matrix of
// the same permutation-block family retargets the decoder. Combinational.
module addr_lut #(
  parameter int unsigned DELTA = ldpc_pkg::DELTA,
  parameter int unsigned GAMMA = ldpc_pkg::GAMMA,
  parameter int unsigned UNIT  = 0
) (
  input  logic [$clog2(GAMMA)-1:0] lane_i,  // row group g
  input  logic [$clog2(DELTA)-1:0] row_i,   // row r inside the group
  output logic [$clog2(DELTA)-1:0] bit_o    // local bit index c
);
  localparam int unsigned DW = $clog2(DELTA);
  typedef logic [DW-1:0] tab_t [GAMMA*DELTA];

  function automatic tab_t build_table();
    tab_t t;
    for (int unsigned g = 0; g < GAMMA; g++)
      for (int unsigned r = 0; r < DELTA; r++)
        t[g*DELTA + r] = DW'(ldpc_pkg::h_col(DELTA, g, UNIT, r));
    return t;
  endfunction

  localparam tab_t TABLE = build_table();

  logic [$clog2(GAMMA*DELTA)-1:0] idx;
  always_comb begin
    idx   = $clog2(GAMMA*DELTA)'(lane_i) * $clog2(GAMMA*DELTA)'(DELTA)
          + $clog2(GAMMA*DELTA)'(row_i);
    bit_o = TABLE[idx];
  end
endmodule
