// tb_dpwt_row_acc: feeds rows of random data f(x), weighted by four random
// tap weights g[l] (p[l] = g[l] * f), with a random enable, and checks the
// low and high row sums in the same cycle as the datum that completes them:
//   odd x >= 3:  low  = sum_l g[l] f(x-3+l)
//                high = -g3 f(x-3) + g2 f(x-2) - g1 f(x-1) + g0 f(x)
//   the cycle after x = N-1 (sel_wrap high, no datum): the same sums over
//   f(N-2), f(N-1), f(0), f(1) (periodic wrap of the row).
module tb_dpwt_row_acc;
  import dpwt_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic col_first, col_second, col_last;
  logic sel_wrap = 0;
  data_t p [D];
  data_t low, high;
  int checks = 0, failures = 0, n_wrap = 0;
  int g [D];
  int f [1][N];  // current row
  int x = 0, row = 0;

  dpwt_row_acc dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    col_first  = (x == 0);
    col_second = (x == 1);
    col_last   = (x == N - 1);
  end

  initial begin
    int v, el, eh;
    for (int l = 0; l < D; l++) g[l] = $urandom_range(0, 1400) - 700;
    for (int i = 0; i < D; i++) p[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (12 * N) begin
      @(negedge clk);
      en = 0;
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      en = 1;
      v = $urandom_range(0, 600) - 300;
      f[0][x] = v;
      for (int l = 0; l < D; l++) p[l] = data_t'(g[l] * v);
      #1;
      if (x % 2 == 1 && x >= 3) begin
        el = g[0]*f[0][x-3] + g[1]*f[0][x-2] + g[2]*f[0][x-1] + g[3]*f[0][x];
        eh = -g[3]*f[0][x-3] + g[2]*f[0][x-2] - g[1]*f[0][x-1] + g[0]*f[0][x];
        checks += 2;
        if (int'(low) != el || int'(high) != eh) begin
          failures++;
          $display("FAIL: row %0d x %0d low %0d/%0d high %0d/%0d", row, x, low, el, high, eh);
        end
      end
      @(posedge clk);
      if (x == N - 1) begin
        @(negedge clk);
        en = 0;
        sel_wrap = 1;
        #1;
        el = g[0]*f[0][N-2] + g[1]*f[0][N-1] + g[2]*f[0][0] + g[3]*f[0][1];
        eh = -g[3]*f[0][N-2] + g[2]*f[0][N-1] - g[1]*f[0][0] + g[0]*f[0][1];
        checks += 2;
        n_wrap++;
        if (int'(low) != el || int'(high) != eh) begin
          failures++;
          $display("FAIL: wrap of row %0d low %0d/%0d high %0d/%0d", row, low, el, high, eh);
        end
        @(negedge clk) sel_wrap = 0;
      end
      #1;
      x = (x + 1) % N;
      if (x == 0) row++;
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
