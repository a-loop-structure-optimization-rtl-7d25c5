// fntt_pkg: constants and helper functions shared by the FNTT processor.
//
// The default configuration is the 65,536-point transform. P is the
// smallest prime with P >= 81*M (the largest convolution value of two
// decimal operands) and P - 1 divisible by M, which for M = 65536 gives
// P = 81*65536 + 1 = 5308417. ALPHA = 167 is the smallest natural number
// whose multiplicative order mod P is exactly M (this choice of ALPHA is
// this design's own; any primitive M-th root of unity works). DW is the
// number of bits needed to hold a residue mod P.
package fntt_pkg;

  localparam int unsigned DEF_M     = 65536;
  localparam int unsigned DEF_P     = 5308417;
  localparam int unsigned DEF_ALPHA = 167;
  localparam int unsigned DEF_DW    = 23;

  // Barrett constant floor(2^(2*k) / p) for residues of k bits (k <= 31).
  function automatic longint unsigned barrett_mu(int unsigned k, int unsigned p);
    return (64'd1 << (2 * k)) / longint'(p);
  endfunction

endpackage
