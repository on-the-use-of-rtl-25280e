// ldpc_pkg: code geometry and Tanner-graph wiring shared by the bit-flipping
// decoder and its units.
//
// The decoder works on a regular quasi-cyclic LDPC code of length N = DC*Z and
// M = DV*Z parity checks, built from a DV x DC array of Z x Z circulant
// permutation matrices. With the defaults (Z=108, DV=3, DC=12) this is the
// N=1296, rate-0.75 code size used for evaluation; every VN sits in DV=3 checks
// and every check covers DC=12 VNs. The exact matrix is this design's own
// choice: block (i,j) is the identity rotated by s(i,j) = (i*j) mod Z, which
// for Z=108 leaves the graph free of 4-cycles. Because each block row sums to
// the all-ones vector, some checks are linearly dependent (rank 320 of 324
// for the defaults), so the true rate is slightly above 0.75 (976/1296).
//
// Row index m = i*Z + r checks column j*Z + ((r + s(i,j)) mod Z) for each
// block column j. Functions below give both directions of that mapping and are
// only used at elaboration time to wire the check and variable node units.
package ldpc_pkg;

  localparam int unsigned DEF_Z  = 108;
  localparam int unsigned DEF_DV = 3;
  localparam int unsigned DEF_DC = 12;
  localparam int unsigned DEF_N  = DEF_Z * DEF_DC;  // 1296
  localparam int unsigned DEF_IT_MAX = 300;         // maximum flip iterations
  localparam int unsigned DEF_PW = 8;               // bits of the probability p

  // Circulant shift of block (i, j).
  function automatic int unsigned shift(int unsigned i, int unsigned j, int unsigned z);
    return (i * j) % z;
  endfunction

  // VN connected to the k-th edge (block column k) of check m.
  function automatic int unsigned cn_nbr(int unsigned m, int unsigned k, int unsigned z);
    int unsigned i, r;
    i = m / z;
    r = m % z;
    return k * z + ((r + shift(i, k, z)) % z);
  endfunction

  // Check connected to the e-th edge (block row e) of VN n.
  function automatic int unsigned vn_nbr(int unsigned n, int unsigned e, int unsigned z);
    int unsigned j, c;
    j = n / z;
    c = n % z;
    return e * z + ((c + z - shift(e, j, z)) % z);
  endfunction

endpackage
