// tb_dpwt_col_acc: feeds three frames of random row sums (N = 8, so N/2 = 4
// row sums per row), 2 to 8 clocks apart as in the engine, and checks, in raster
// order, every output of the first two frames:
//   SS = sum_k rl[k](2n1+k),  SD = sum_k rh[k](2n1+k),
//   DS = -rl[3](2n1) + rl[2](2n1+1) - rl[1](2n1+2) + rl[0](2n1+3), DD alike
//   with rh, rows taken modulo N (periodic), and ss_next = SS >>> 11.
// Frames are checked in full, the last one included: its last row must
// drain without further input. Also checked: one-cycle latency of every
// other output (it follows an rs_valid), last-row outputs at least GAP
// clocks apart and all out within N/2 * (GAP + 1) + 2 clocks of the end of
// row N-1.
module tb_dpwt_col_acc;
  import dpwt_pkg::*;

  localparam int N = 8;
  localparam int W = N / 2;
  localparam int FR = 3;
  localparam int GAP = 6;

  logic clk = 0, rst_n = 0, rs_valid = 0;
  data_t rl [D], rh [D];
  logic out_valid;
  bands_t out;
  data_t ss_next;
  int checks = 0, failures = 0;
  int R [2][D][FR][N][W];
  int out_cnt = 0, n_lastrow = 0;
  logic rs_prev = 0;
  longint cycle = 0, frame_done = 0, last_lr = 0;

  dpwt_col_acc #(.N(N), .GAP(GAP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int rsum(int b, int k, int f, int r, int c);
    return R[b][k][f][r % N][c];
  endfunction

  initial begin
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < D; k++)
        for (int f = 0; f < FR; f++)
          for (int r = 0; r < N; r++)
            for (int c = 0; c < W; c++)
              R[b][k][f][r][c] = $urandom_range(0, 200000) - 100000;
    for (int k = 0; k < D; k++) begin rl[k] = '0; rh[k] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < FR; f++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          rs_valid = 0;
          repeat ($urandom_range(1, 7)) @(negedge clk);
          rs_valid = 1;
          for (int k = 0; k < D; k++) begin
            rl[k] = data_t'(R[0][k][f][r][c]);
            rh[k] = data_t'(R[1][k][f][r][c]);
          end
        end
    @(negedge clk) rs_valid = 0;
    repeat (W * (GAP + 1) + 5) @(posedge clk);
    check(out_cnt == FR * W * W, "wrong number of outputs");
    check(n_lastrow > 0, "no last-row output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    rs_prev <= rs_valid;
    cycle <= cycle + 1;
    if (rs_valid && dut.row == N - 1 && dut.col == W - 1) frame_done <= cycle;
    if (rst_n && out_valid) begin
      automatic int f = out_cnt / (W * W);
      automatic int n1 = (out_cnt % (W * W)) / W;
      automatic int n2 = out_cnt % W;
      automatic int r0 = 2 * n1;
      automatic int ess, esd, eds, edd;
      if (n1 != W - 1) check(rs_prev, "output not one cycle after a row sum");
      else begin
        if (n2 > 0) check(cycle - last_lr >= GAP, "last-row outputs closer than GAP");
        check(cycle - frame_done <= W * (GAP + 1) + 2, "last row late");
        last_lr <= cycle;
      end
      if (f < FR) begin
        ess = rsum(0,0,f,r0,n2) + rsum(0,1,f,r0+1,n2) + rsum(0,2,f,r0+2,n2) + rsum(0,3,f,r0+3,n2);
        esd = rsum(1,0,f,r0,n2) + rsum(1,1,f,r0+1,n2) + rsum(1,2,f,r0+2,n2) + rsum(1,3,f,r0+3,n2);
        eds = -rsum(0,3,f,r0,n2) + rsum(0,2,f,r0+1,n2) - rsum(0,1,f,r0+2,n2) + rsum(0,0,f,r0+3,n2);
        edd = -rsum(1,3,f,r0,n2) + rsum(1,2,f,r0+1,n2) - rsum(1,1,f,r0+2,n2) + rsum(1,0,f,r0+3,n2);
        check(int'(out.ss) == ess, $sformatf("f%0d n1=%0d n2=%0d SS %0d exp %0d", f, n1, n2, out.ss, ess));
        check(int'(out.sd) == esd, $sformatf("f%0d n1=%0d n2=%0d SD %0d exp %0d", f, n1, n2, out.sd, esd));
        check(int'(out.ds) == eds, $sformatf("f%0d n1=%0d n2=%0d DS %0d exp %0d", f, n1, n2, out.ds, eds));
        check(int'(out.dd) == edd, $sformatf("f%0d n1=%0d n2=%0d DD %0d exp %0d", f, n1, n2, out.dd, edd));
        check(int'(ss_next) == (ess >>> 11), "ss_next");
        if (n1 == W - 1) n_lastrow++;
      end
      out_cnt++;
    end
  end

  initial begin
    repeat (40 * FR * N * W) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
