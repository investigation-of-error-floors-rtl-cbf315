// msg_bank: one bank of the message memory M0 or M1.
//
// Each processing unit owns one bank of M0 (bit-to-check messages) and one
// of M1 (check-to-bit messages). A bank holds the DELTA*GAMMA messages of
// the unit's DELTA bits, one per edge, stored in the order the bit node
// uses them: word c, lane g is the message between local bit c and its
// check in row group g. One write and one read port, both synchronous; the
// read data appears the cycle after the address (block RAM style). A write
// can target one lane or, with wall_i, every lane of a word at once; the
// latter loads the prior LLR into all GAMMA edges of a bit in one cycle so
// that loading takes DELTA cycles. The lane-wide write is this design's
// choice. Contents are not reset.
module msg_bank #(
  parameter int unsigned WIDTH = ldpc_pkg::W_DEF,
  parameter int unsigned DELTA = ldpc_pkg::DELTA,
  parameter int unsigned GAMMA = ldpc_pkg::GAMMA
) (
  input  logic                     clk,
  input  logic                     we_i,
  input  logic                     wall_i,
  input  logic [$clog2(DELTA)-1:0] waddr_i,
  input  logic [$clog2(GAMMA)-1:0] wlane_i,
  input  logic [WIDTH-1:0]         wdata_i,
  input  logic [$clog2(DELTA)-1:0] raddr_i,
  input  logic [$clog2(GAMMA)-1:0] rlane_i,
  output logic [WIDTH-1:0]         rdata_o
);
  logic [WIDTH-1:0] mem [DELTA][GAMMA];

  always_ff @(posedge clk) begin
    for (int l = 0; l < GAMMA; l++)
      if (we_i && (wall_i || wlane_i == $clog2(GAMMA)'(l)))
        mem[waddr_i][l] <= wdata_i;
    rdata_o <= mem[raddr_i][rlane_i];
  end
endmodule
