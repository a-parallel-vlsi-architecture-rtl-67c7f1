// tb_dpwt_top_512x512: the image-size workload of the analysis: a 512 x 512
// image decomposed in six stages down to 8 x 8 subbands with the 4-tap
// filter. Two frames (random, then smooth with input gaps) are streamed;
// every coefficient of every band of every stage is compared with the direct
// periodized transform, and the same rate, timing and mechanism checks as
// in the 16 x 16 end-to-end test are made.
module tb_dpwt_top_512x512;
  import dpwt_pkg::*;
  import dpwt_ref_pkg::*;

  localparam int N      = 512;
  localparam int STAGES = 6;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [7:0] pix = 0;
  logic pix_ready;
  logic band_valid [STAGES];
  bands_t bands [STAGES];
  logic overflow;

  dpwt_top #(.N(N), .STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint img [FRAMES][];
  longint expv [STAGES][FRAMES][4][];
  int out_cnt [STAGES] = '{default: 0};
  int n_wrap_col = 0, n_wrap_row = 0, n_backpressure = 0, n_gaps = 0;
  int n_slot [STAGES] = '{default: 0};
  longint cycle = 0;
  int accepted = 0;  // pixels accepted so far
  longint last_accept = -10;
  longint frame_first = 0;
  longint frame_end [FRAMES];
  longint extra_sum [STAGES] = '{default: 0};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic longint sx(data_t v);
    return longint'(v);
  endfunction

  // Build frames and the reference results.
  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[N * N];
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          case (f % 3)
            0: img[f][y * N + x] = $urandom_range(0, 255);
            1: img[f][y * N + x] = (x * 12 + y * 3 + $urandom_range(0, 20)) % 256;
            default: img[f][y * N + x] = ((x + y) % 2) ? 255 : 0;
          endcase
        end
    end
    for (int f = 0; f < FRAMES; f++) begin
      automatic longint cur [];
      automatic int m = N;
      cur = img[f];
      for (int s = 0; s < STAGES; s++) begin
        for (int b = 0; b < 4; b++) transform(m, cur, b, expv[s][f][b]);
        cur = new[(m / 2) * (m / 2)];
        foreach (cur[i]) cur[i] = expv[s][f][0][i] >>> 11;
        m = m / 2;
      end
    end
  end

  // Drive pixels: even frames continuous, odd frames with random gaps.
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < N * N; i++) begin
        @(negedge clk);
        if (f % 2 == 1) begin
          while ($urandom_range(0, 3) == 0) begin
            pix_valid = 0;
            n_gaps++;
            @(negedge clk);
          end
        end
        pix_valid = 1;
        pix = 8'(img[f][i]);
        @(posedge clk);
        while (!pix_ready) begin
          n_backpressure++;
          @(posedge clk);
        end
        @(negedge clk) pix_valid = 0;
      end
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && pix_valid && pix_ready) begin
      check(cycle - last_accept >= 2, "two pixels accepted within two cycles");
      last_accept <= cycle;
      accepted <= accepted + 1;
      if (accepted % (N * N) == 0) frame_first <= cycle;
      if (accepted % (N * N) == N * N - 1) frame_end[accepted / (N * N)] <= cycle;
      // Continuously fed frames must take exactly two clocks per pixel.
      if (accepted % (N * N) == N * N - 1 && (accepted / (N * N)) % 2 == 0)
        check(cycle - frame_first == 2 * (N * N - 1),
              $sformatf("frame %0d took %0d cycles", accepted / (N * N), cycle - frame_first));
    end
    if (rst_n && dut.slot_valid) n_slot[dut.slot_stage]++;
    if (rst_n) check(!overflow, "controller queue overflow");
  end

  // Compare outputs.
  for (genvar s = 0; s < STAGES; s++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && band_valid[s]) begin
        automatic int m2 = (N >> s) / 2;
        automatic int idx = out_cnt[s];
        automatic int f = idx / (m2 * m2);
        automatic int pos = idx % (m2 * m2);
        if (f < FRAMES) begin
          check(sx(bands[s].ss) == expv[s][f][0][pos], $sformatf("s%0d f%0d pos%0d SS %0d exp %0d", s, f, pos, sx(bands[s].ss), expv[s][f][0][pos]));
          check(sx(bands[s].sd) == expv[s][f][1][pos], $sformatf("s%0d f%0d pos%0d SD %0d exp %0d", s, f, pos, sx(bands[s].sd), expv[s][f][1][pos]));
          check(sx(bands[s].ds) == expv[s][f][2][pos], $sformatf("s%0d f%0d pos%0d DS %0d exp %0d", s, f, pos, sx(bands[s].ds), expv[s][f][2][pos]));
          check(sx(bands[s].dd) == expv[s][f][3][pos], $sformatf("s%0d f%0d pos%0d DD %0d exp %0d", s, f, pos, sx(bands[s].dd), expv[s][f][3][pos]));
          if (pos % m2 == m2 - 1) n_wrap_col++;
          if (pos / m2 == m2 - 1) n_wrap_row++;
          if (pos == m2 * m2 - 1) begin
            // The last coefficient of stage s+1 must follow the frame's
            // last pixel by at most s+1 row times (2N clocks each), plus a
            // few of the stage's output spacings.
            extra_sum[s] += cycle - frame_end[f];
            check(cycle - frame_end[f] <= (s + 1) * 2 * N + (8 << s),
                  $sformatf("stage %0d last row of frame %0d late: %0d clocks", s + 1, f, cycle - frame_end[f]));
          end
          if (s == 0 && pos == m2 * m2 - 1) begin
            // Last stage-1 coefficient of frame f: the next frame's second
            // row must not have started yet.
            check(accepted <= (f + 1) * N * N + N + 1,
                  $sformatf("stage-1 last row of frame %0d late: %0d pixels in", f, accepted));
          end
        end
        out_cnt[s]++;
      end
    end
  end

  initial begin
    int done;
    done = 0;
    while (!done) begin
      @(posedge clk);
      done = 1;
      for (int s = 0; s < STAGES; s++)
        if (out_cnt[s] < FRAMES * ((N >> s) / 2) * ((N >> s) / 2)) done = 0;
    end
    repeat (4) @(posedge clk);
    check(n_wrap_col > 0, "no wrapped column output seen");
    check(n_wrap_row > 0, "no wrapped last-row output seen");
    check(n_backpressure > 0, "no back-pressure seen");
    check(n_gaps > 0, "no input gap seen");
    for (int s = 0; s < STAGES; s++)
      check(n_slot[s] > 0, $sformatf("no slot used by stage %0d", s + 1));
    $display("mechanisms: wrap_col=%0d wrap_row=%0d backpressure=%0d gaps=%0d",
             n_wrap_col, n_wrap_row, n_backpressure, n_gaps);
    for (int s = 0; s < STAGES; s++) $display("slots used by stage %0d: %0d", s + 1, n_slot[s]);
    for (int s = 0; s < STAGES; s++)
      $display("stage %0d: last coefficient of a frame %0d clocks after its last pixel (mean)",
               s + 1, extra_sum[s] / FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * (FRAMES + 2) * N * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
