// dpwt_par_mult: the parallel-multipliers unit.
//
// Multiplies the datum in the current input slot by every distinct 2-D LL
// filter coefficient. For a 4-tap filter there are d(d+1)/2 = 10 distinct
// coefficients C[k][l] (k <= l), so ten multipliers are instantiated; the
// full 4x4 matrix of weighted data is then formed by wiring w[l][k] to the
// same product as w[k][l]. The weighted data are broadcast to the data
// accumulators of all stages.
//
// Interface: x is the datum (q-bit two's complement); w[k][l] = x * C[k][l],
// truncated to q bits. Timing: purely combinational; the multiply is part of
// the single-cycle path from the input slot register to the accumulator
// registers, as the text describes (one multiply and two adds per cycle).
//
// Products by even coefficients (414, 192, -30, ...) have constant zero low
// bits; synthesis reports those output bits as constant, which is expected.
//
// Follows the text: ten multipliers for d = 4, shared by all stages.
// Own choice: products keep q = 21 bits (the text keeps all intermediate
// coefficients in q bits).
module dpwt_par_mult
  import dpwt_pkg::*;
(
  input  data_t x,
  output data_t w [D][D]
);

  // One multiplier per distinct coefficient (upper triangle, k <= l).
  for (genvar k = 0; k < D; k++) begin : g_row
    for (genvar l = k; l < D; l++) begin : g_col
      localparam logic signed [P_BITS-1:0] COEF = P_BITS'(coef(k, l));
      data_t prod;
      always_comb prod = data_t'(x * COEF);
      assign w[k][l] = prod;
      if (l != k) begin : g_mirror
        assign w[l][k] = prod;
      end
    end
  end

endmodule
