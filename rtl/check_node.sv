// check_node: the single check node shared by all processing units.
//
// Every cycle of the check-to-bit operation it receives, from each of the
// RHO processing units, the Phi-domain magnitude, the sign and the current
// hard decision of one bit-to-check message, all belonging to the same
// check. It returns (one register stage later) the sum of the RHO
// magnitudes, the XOR of the RHO signs and the XOR of the RHO decisions.
// The sum and the sign are broadcast back to the units, which remove their
// own contribution locally (marginalization), so only one global sum is
// needed. The decision parity is 1 when the check is unsatisfied by the
// previous iteration's hard decisions; the controller uses it to stop early.
// The sum is exact (MW + log2(RHO) bits, no saturation).
module check_node #(
  parameter int unsigned RHO = ldpc_pkg::RHO,
  parameter int unsigned MW  = ldpc_pkg::W_DEF - 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            valid_i,
  input  logic [RHO-1:0][MW-1:0]          phi_i,
  input  logic [RHO-1:0]                  sgn_i,
  input  logic [RHO-1:0]                  dec_i,
  output logic                            valid_o,
  output logic [MW+$clog2(RHO)-1:0]       sum_o,
  output logic                            sgn_o,
  output logic                            parity_o
);
  localparam int unsigned SW = MW + $clog2(RHO);
  logic [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < RHO; i++) sum = sum + SW'(phi_i[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o  <= 1'b0;
      sum_o    <= '0;
      sgn_o    <= 1'b0;
      parity_o <= 1'b0;
    end else begin
      valid_o  <= valid_i;
      sum_o    <= sum;
      sgn_o    <= ^sgn_i;
      parity_o <= ^dec_i;
    end
  end
endmodule
