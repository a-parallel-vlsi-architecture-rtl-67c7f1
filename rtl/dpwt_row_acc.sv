// dpwt_row_acc: one row accumulator (one row k of the 4x4 operator).
//
// Input is the four weighted data p[l] = C[k][l] * f(x) of the current datum
// f(x) of a row. Two linear systolic arrays, each cell one adder or
// subtracter and one register, form the horizontal 4-tap sums with a
// decimation-by-two step:
//   low  (left to right):  L(x) = C[k][0]f(x-3) + C[k][1]f(x-2) + C[k][2]f(x-1) + C[k][3]f(x)
//   high (right to left, alternating signs):
//                          H(x) = -C[k][3]f(x-3) + C[k][2]f(x-2) - C[k][1]f(x-1) + C[k][0]f(x)
// L and H are the LL- and LH-operator row sums for output column n = (x-3)/2
// and are used at odd x >= 3 only.
//
// Column boundary (periodic wrap): the last output column of a row,
// n = N/2-1, needs f(N-2), f(N-1), f(0), f(1). Two extra cells form the
// contribution of f(0), f(1) at the start of the row and keep it in a storage
// cell per band; at x = N-1 it is added to the partial sums of f(N-2),
// f(N-1), and the result waits in a delay register. Since x = N-1 also yields
// the normal output for n = N/2-2, the wrapped output is presented in the
// following clock cycle (sel_wrap), through the output multiplexer.
//
// Interface: every register advances only when en is high (the datum in the
// input slot belongs to this stage). col_first / col_second / col_last mark
// x = 0, 1, N-1 and are qualified by en. sel_wrap selects the delayed wrapped
// sums at the output (driven in the cycle after the x = N-1 datum).
// low/high are combinational.
// Timing: the sum for a datum is available in the same cycle as the datum;
// the wrapped sums one cycle after the last datum of the row.
//
// Follows the text: the two systolic chains, the two storage cells, the
// delay register and the output multiplexer. Own choices: reset to zero and
// the exact point where the wrapped sum is formed.
module dpwt_row_acc
  import dpwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  col_first,
  input  logic  col_second,
  input  logic  col_last,
  input  logic  sel_wrap,
  input  data_t p [D],
  output data_t low,
  output data_t high
);

  // Systolic chain registers (three per band for d = 4).
  data_t l1, l2, l3;
  data_t h1, h2, h3;
  // Boundary cells: partial sum after f(0), storage cell after f(1).
  data_t bl, bh, sl, sh;
  // Delay registers holding the wrapped sums.
  data_t dl, dh;

  data_t low_sum, high_sum;
  always_comb begin
    low_sum  = l3 + p[3];
    high_sum = h3 + p[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1 <= '0; l2 <= '0; l3 <= '0;
      h1 <= '0; h2 <= '0; h3 <= '0;
      bl <= '0; bh <= '0; sl <= '0; sh <= '0;
      dl <= '0; dh <= '0;
    end else if (en) begin
      l1 <= p[0];
      l2 <= l1 + p[1];
      l3 <= l2 + p[2];
      h1 <= '0 - p[3];
      h2 <= h1 + p[2];
      h3 <= h2 - p[1];
      if (col_first) begin
        bl <= p[2];
        bh <= '0 - p[1];
      end
      if (col_second) begin
        sl <= bl + p[3];
        sh <= bh + p[0];
      end
      if (col_last) begin
        dl <= l1 + p[1] + sl;
        dh <= h1 + p[2] + sh;
      end
    end
  end

  assign low  = sel_wrap ? dl : low_sum;
  assign high = sel_wrap ? dh : high_sum;

endmodule
