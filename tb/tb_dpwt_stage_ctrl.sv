// tb_dpwt_stage_ctrl: drives a random enable pattern (never high in two
// consecutive cycles, as in the engine) over several rows and checks the
// decoded strobes against an independent column count: x = 0, x = 1,
// x = N-1, wrap_tick in the cycle after an x = N-1 datum, and row-sum valid
// at odd x >= 3 or on wrap_tick (N/2 row sums per row).
module tb_dpwt_stage_ctrl;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic col_first, col_second, col_last, wrap_tick, rs_valid;
  bit last_prev = 0;
  int checks = 0, failures = 0;
  int x = 0, rows = 0, n_valid = 0;

  dpwt_stage_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (x=%0d)", msg, x);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (300) begin
      @(negedge clk);
      en = !en && ($urandom_range(0, 3) != 0);
      #1;
      check(col_first == (x == 0), "col_first");
      check(col_second == (x == 1), "col_second");
      check(col_last == (x == N - 1), "col_last");
      check(wrap_tick == last_prev, "wrap_tick");
      check(rs_valid == ((en && x % 2 == 1 && x >= 3) || last_prev), "rs_valid");
      if (rs_valid) n_valid++;
      @(posedge clk);
      last_prev = en && (x == N - 1);
      if (en) begin
        x = (x + 1) % N;
        if (x == 0) rows++;
      end
    end
    // N/2 row sums per row, one of them delivered in the next row.
    check(n_valid >= rows * N / 2, "too few row-sum strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
