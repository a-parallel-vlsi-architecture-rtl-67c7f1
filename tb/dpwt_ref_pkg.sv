// dpwt_ref_pkg: reference model for the testbenches.
//
// Computes the periodized 2-D wavelet transform of an m x m image directly
// from the operator definition, with no knowledge of the hardware structure:
//   b(n1,n2) = sum_k sum_l f((2n1+k) mod m, (2n2+l) mod m) * W[k][l]
// for the four operators W_LL[k][l] = c(k,l), W_LH = (-1)^(3-l) c(k,3-l),
// W_HL = (-1)^(3-k) c(3-k,l), W_HH = (-1)^(k+l) c(3-k,3-l), where c(k,l) is
// the Daubechies-4 product h'(k)h'(l) (h' normalised to unit sum) scaled by
// 2048 and rounded to the nearest integer, computed here in floating point.
package dpwt_ref_pkg;

  function automatic int ref_coef(int k, int l);
    real s3, h [4];
    s3 = $sqrt(3.0);
    h[0] = (1.0 + s3) / 8.0;
    h[1] = (3.0 + s3) / 8.0;
    h[2] = (3.0 - s3) / 8.0;
    h[3] = (1.0 - s3) / 8.0;
    return int'(h[k] * h[l] * 2048.0);
  endfunction

  // band: 0 = SS (LL), 1 = SD (LH), 2 = DS (HL), 3 = DD (HH)
  function automatic longint op_coef(int band, int k, int l);
    case (band)
      0: return ref_coef(k, l);
      1: return ((3 - l) % 2 ? -1 : 1) * ref_coef(k, 3 - l);
      2: return ((3 - k) % 2 ? -1 : 1) * ref_coef(3 - k, l);
      default: return ((k + l) % 2 ? -1 : 1) * ref_coef(3 - k, 3 - l);
    endcase
  endfunction

  // img is m*m row-major; result is (m/2)*(m/2) row-major.
  function automatic void transform(input int m, input longint img [],
                                    input int band, output longint res []);
    res = new[(m / 2) * (m / 2)];
    for (int n1 = 0; n1 < m / 2; n1++)
      for (int n2 = 0; n2 < m / 2; n2++) begin
        longint acc = 0;
        for (int k = 0; k < 4; k++)
          for (int l = 0; l < 4; l++)
            acc += img[((2 * n1 + k) % m) * m + ((2 * n2 + l) % m)] * op_coef(band, k, l);
        res[n1 * (m / 2) + n2] = acc;
      end
  endfunction

endpackage
