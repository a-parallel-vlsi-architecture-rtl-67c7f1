// tb_dpwt_data_acc: one stage (N = 8) fed with weighted data
// w[k][l] = c(k,l) * f computed by the testbench, three frames of random
// pixels with random gaps in en (never two data in consecutive cycles, as
// in the engine). Every band of every frame is compared with the direct
// periodized transform (dpwt_ref_pkg), ss_next with SS >>> 11; the last
// frame's last row must come out with no further input. The latency is
// checked: one cycle after the completing datum, two for the last column
// (which passes the row accumulators' delay register); the last row is
// drained separately and not timed here.
module tb_dpwt_data_acc;
  import dpwt_pkg::*;
  import dpwt_ref_pkg::*;

  localparam int N = 8;
  localparam int M = N / 2;
  localparam int FR = 3;

  logic clk = 0, rst_n = 0, en = 0;
  data_t w [D][D];
  logic out_valid;
  bands_t out;
  data_t ss_next;
  int checks = 0, failures = 0;
  longint img [FR][];
  longint expv [FR][4][];
  int out_cnt = 0;
  logic en_prev = 0, en_prev2 = 0;

  dpwt_data_acc #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int f = 0; f < FR; f++) begin
      img[f] = new[N * N];
      foreach (img[f][i]) img[f][i] = $urandom_range(0, 255);
      for (int b = 0; b < 4; b++) transform(N, img[f], b, expv[f][b]);
    end
    for (int k = 0; k < D; k++) for (int l = 0; l < D; l++) w[k][l] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < FR; f++)
      for (int i = 0; i < N * N; i++) begin
        @(negedge clk);
        en = 0;
        @(negedge clk);
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        en = 1;
        for (int k = 0; k < D; k++)
          for (int l = 0; l < D; l++) w[k][l] = data_t'(img[f][i] * ref_coef(k, l));
      end
    @(negedge clk) en = 0;
    repeat (M * 5 + 5) @(posedge clk);
    check(out_cnt == FR * M * M, "wrong number of outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    en_prev <= en;
    en_prev2 <= en_prev;
    if (rst_n && out_valid) begin
      automatic int f = out_cnt / (M * M);
      automatic int pos = out_cnt % (M * M);
      if (pos / M != M - 1) begin
        if (pos % M != M - 1) check(en_prev, "output latency is not one cycle");
        else check(en_prev2 && !en_prev, "last-column latency is not two cycles");
      end
      if (f < FR) begin
        check(longint'(out.ss) == expv[f][0][pos], $sformatf("f%0d pos%0d SS %0d exp %0d", f, pos, out.ss, expv[f][0][pos]));
        check(longint'(out.sd) == expv[f][1][pos], $sformatf("f%0d pos%0d SD %0d exp %0d", f, pos, out.sd, expv[f][1][pos]));
        check(longint'(out.ds) == expv[f][2][pos], $sformatf("f%0d pos%0d DS %0d exp %0d", f, pos, out.ds, expv[f][2][pos]));
        check(longint'(out.dd) == expv[f][3][pos], $sformatf("f%0d pos%0d DD %0d exp %0d", f, pos, out.dd, expv[f][3][pos]));
        check(longint'(ss_next) == (expv[f][0][pos] >>> 11), "ss_next");
      end
      out_cnt++;
    end
  end

  initial begin
    repeat (20 * FR * N * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
