// phi_lut: quantized Phi(x) = -log(tanh(x/2)) on a message magnitude.
//
// The decoder works in the Phi domain at the check node (sum of Phi of the
// incoming magnitudes) and maps back with the same function, since Phi is
// its own inverse. The input is the (W-1)-bit magnitude of a W-bit
// sign-magnitude message with FRAC fraction bits (uniform quantization);
// the output is in the same format. The table is computed at elaboration:
//     y(i) = round(Phi(x_i) * 2^FRAC), x_i = i / 2^FRAC (x_0 = 0.5 / 2^FRAC)
// saturated to 2^(W-1) - 1. Input 0 uses half an LSB because Phi(0) is
// infinite. The function is from the decoder description; the table
// resolution, the rounding and the treatment of 0 are this design's choice.
// Purely combinational, one table per use.
module phi_lut #(
  parameter int unsigned W    = ldpc_pkg::W_DEF,
  parameter int unsigned FRAC = ldpc_pkg::FRAC_DEF
) (
  input  logic [W-2:0] mag_i,
  output logic [W-2:0] phi_o
);
  localparam int unsigned MW = W - 1;
  typedef logic [MW-1:0] tab_t [2**MW];

  function automatic tab_t build_table();
    tab_t t;
    for (int i = 0; i < 2**MW; i++) begin
      real x, f;
      int  q;
      x = ((i == 0) ? 0.5 : real'(i)) / real'(2**FRAC);
      f = $ln(($exp(x) + 1.0) / ($exp(x) - 1.0));
      q = int'(f * real'(2**FRAC));
      if (q > 2**MW - 1) q = 2**MW - 1;
      t[i] = MW'(q);
    end
    return t;
  endfunction

  localparam tab_t TABLE = build_table();

  assign phi_o = TABLE[mag_i];
endmodule
