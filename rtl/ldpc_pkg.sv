// ldpc_pkg: sizes, message formats and code-construction helpers shared by
// the parallel-serial LDPC decoder and its emulation platform.
//
// Default sizes are those of the (6,32)-regular (2048,1723) Reed-Solomon
// based LDPC code: M = 384 checks, N = 2048 bits, split into GAMMA = 6 row
// groups and RHO = 32 column groups of DELTA x DELTA = 64 x 64 permutation
// submatrices. The message wordlength W defaults to 6 bits (the decoder is
// also described at 5 and 9 bits).
//
// Parity-check matrix. The RS-based construction takes the codewords of a
// two-information-symbol Reed-Solomon code over GF(2^p), DELTA = 2^p, and
// maps every code symbol to a one-hot DELTA-bit location vector. Written in
// evaluation form the codewords are f(x) = a + b*x evaluated at RHO distinct
// points x_j. Row group g fixes b = alpha^g, the row inside the group is the
// field element a = r, so block (g, j) maps row r to column
//     c = r XOR alpha^((g + j) mod (DELTA - 1))
// which is a permutation of 0..DELTA-1. Two rows share at most one column,
// so the Tanner graph has no 4-cycles; for the default sizes H has GF(2)
// rank 325 and the code is (2048,1723). The evaluation points alpha^j and
// the coset representatives alpha^g are this design's choice; another
// choice gives an equivalent code up to a reordering of bits inside each
// column group.
package ldpc_pkg;

  // Code and architecture sizes.
  localparam int unsigned N_BITS   = 2048;  // code length
  localparam int unsigned M_CHECKS = 384;   // parity checks
  localparam int unsigned DELTA    = 64;    // permutation submatrix size
  localparam int unsigned GAMMA    = 6;     // row groups (bit degree)
  localparam int unsigned RHO      = 32;    // column groups = processing units
  // Fixed-point message format: W-bit sign-magnitude, FRAC fraction bits.
  localparam int unsigned W_DEF    = 6;
  localparam int unsigned FRAC_DEF = 2;
  // Iteration limit register width (the platform runs up to 200 iterations).
  localparam int unsigned ITW      = 8;

  // Decoder phases.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_LOAD   = 3'd1,
    PH_C2B    = 3'd2,  // check-to-bit: read M0, check node, write M1
    PH_STALL1 = 3'd3,  // drain before bit-to-check (read-before-write)
    PH_B2C    = 3'd4,  // bit-to-check: read M1, bit node, write M0
    PH_STALL2 = 3'd5,  // drain before the next check-to-bit
    PH_DONE   = 3'd6
  } phase_t;

  // Primitive polynomial (including the x^p term) of GF(2^p).
  function automatic int unsigned gf_poly(int unsigned p);
    case (p)
      2:       return 'h7;
      3:       return 'hB;
      4:       return 'h13;
      5:       return 'h25;
      6:       return 'h43;
      7:       return 'h83;
      8:       return 'h11D;
      default: return 'h43;
    endcase
  endfunction

  // alpha^e in GF(2^p), alpha a root of gf_poly(p).
  function automatic int unsigned gf_alpha_pow(int unsigned p, int unsigned e);
    int unsigned v;
    v = 1;
    for (int unsigned i = 0; i < e; i++) begin
      v = v << 1;
      if (((v >> p) & 1) != 0) v = v ^ gf_poly(p);
    end
    return v;
  endfunction

  // Column (inside column group j) connected to row r of row group g.
  function automatic int unsigned h_col(int unsigned delta, int unsigned g,
                                        int unsigned j, int unsigned r);
    int unsigned p;
    p = $clog2(delta);
    return r ^ gf_alpha_pow(p, (g + j) % (delta - 1));
  endfunction

endpackage
