// dpwt_pkg: constants and types shared by the non-separate 2-D periodized
// wavelet transform (DPWT) engine.
//
// The engine computes the 2-D DPWT with the 4-tap Daubechies filter by the
// 2-D operator correlation method: every input datum is multiplied once by
// the 2-D LL-band filter coefficients h(k)h(l), and the four subbands are
// obtained from the same weighted data by accumulating them in different
// directions (the LH, HL and HH operators are mirror images of the LL one,
// with alternating signs).
//
// Coefficient table (follows the text): the 1-D Daubechies-4 filter is
// normalised so that the LL operator sums to one, h'(n) = h(n)/sqrt(2), i.e.
//   h' = [(1+sqrt3), (3+sqrt3), (3-sqrt3), (1-sqrt3)] / 8,
// and each 2-D coefficient is quantised to p bits:
//   C[k][l] = round(h'(k) * h'(l) * 2^(p-1)),  p = 12, so 2^(p-1) = 2048.
// The LL coefficients sum to exactly 2048. The table is symmetric, so only
// d(d+1)/2 = 10 of its 16 entries are distinct.
package dpwt_pkg;

  // Filter length. The datapath (boundary handling in particular) is built
  // for d = 4 only.
  localparam int unsigned D = 4;
  // Coefficient precision p (bits) and intermediate data precision q (bits).
  localparam int unsigned P_BITS = 12;
  localparam int unsigned Q_BITS = 21;
  // Input pixel width.
  localparam int unsigned PIX_BITS = 8;

  typedef logic signed [Q_BITS-1:0] data_t;

  // Quantised LL-band 2-D filter coefficient C[k][l] (= C[l][k]).
  function automatic int coef(int k, int l);
    int t [D*D];
    t = '{ 239,  414,  111,  -64,
           414,  717,  192, -111,
           111,  192,   51,  -30,
           -64, -111,  -30,   17};
    return t[k*D + l];
  endfunction

  // The four subband coefficients produced for one output position.
  typedef struct packed {
    data_t ss;  // LL band  (low rows, low columns)
    data_t sd;  // LH band  (low vertically, high horizontally)
    data_t ds;  // HL band  (high vertically, low horizontally)
    data_t dd;  // HH band
  } bands_t;

endpackage
