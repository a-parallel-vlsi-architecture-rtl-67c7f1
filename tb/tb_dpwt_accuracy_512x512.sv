// tb_dpwt_accuracy_512x512: finite-precision accuracy of the engine, in the
// way the published analysis measures it. A 512 x 512 textured 8-bit image
// is decomposed in six stages (to 8 x 8 subbands); each hardware coefficient,
// divided by 2048, is compared with the same coefficient computed in double
// precision from real-valued Daubechies-4 filters (separable form). Two
// references are used, and SNR = 10 log10(sum ref^2 / sum (ref - hw)^2) is
// printed for every band and stage against each:
//   end to end  - the real transform of the image, with real LL values
//                 passed between stages (the whole finite-precision loss,
//                 including the integer stage inputs);
//   per stage   - the real transform of the stage's actual integer input
//                 (floor(SS/2048) of the previous stage, from the bit-exact
//                 model in dpwt_ref_pkg), i.e. the loss due to the 12-bit
//                 2-D coefficients alone.
// Per-stage SNR must reach MIN_DB in every band; end-to-end SNR of stage 1
// must reach MIN_DB too (later stages are only reported, since their loss
// depends on the image content).
module tb_dpwt_accuracy_512x512;
  import dpwt_pkg::*;
  import dpwt_ref_pkg::*;

  localparam int N      = 512;
  localparam int STAGES = 6;
  localparam real MIN_DB = 50.0;

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
  int img [N * N];
  real refv [STAGES][4][];
  real refp [STAGES][4][];
  real sig [STAGES][4], err [STAGES][4];
  real sigp [STAGES][4], errp [STAGES][4];
  int out_cnt [STAGES] = '{default: 0};

  // Double-precision periodized transform of an m x m real image.
  function automatic void dwt_real(input int m, input real a [], output real res [4][]);
    real h [4], g [4];
    real s3 = $sqrt(3.0);
    h[0] = (1.0 + s3) / 8.0; h[1] = (3.0 + s3) / 8.0;
    h[2] = (3.0 - s3) / 8.0; h[3] = (1.0 - s3) / 8.0;
    for (int l = 0; l < 4; l++) g[l] = ((3 - l) % 2 ? -1.0 : 1.0) * h[3 - l];
    for (int b = 0; b < 4; b++) res[b] = new[(m / 2) * (m / 2)];
    for (int n1 = 0; n1 < m / 2; n1++)
      for (int n2 = 0; n2 < m / 2; n2++) begin
        real acc [4] = '{0.0, 0.0, 0.0, 0.0};
        for (int k = 0; k < 4; k++)
          for (int l = 0; l < 4; l++) begin
            real v = a[((2 * n1 + k) % m) * m + ((2 * n2 + l) % m)];
            acc[0] += v * h[k] * h[l];
            acc[1] += v * h[k] * g[l];
            acc[2] += v * g[k] * h[l];
            acc[3] += v * g[k] * g[l];
          end
        for (int b = 0; b < 4; b++) res[b][n1 * (m / 2) + n2] = acc[b];
      end
  endfunction

  initial begin
    automatic real cur [];
    automatic int m = N;
    automatic longint ci [];
    automatic longint ll [];
    automatic real cr [];
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        automatic real v = 128.0 + 60.0 * $sin(x * 0.031) * $cos(y * 0.047)
                 + 30.0 * $sin((x + 2 * y) * 0.21) + real'($urandom_range(0, 40)) - 20.0;
        img[y * N + x] = (v < 0.0) ? 0 : (v > 255.0) ? 255 : int'(v);
      end
    cur = new[N * N];
    ci = new[N * N];
    foreach (cur[i]) begin cur[i] = img[i]; ci[i] = img[i]; end
    for (int s = 0; s < STAGES; s++) begin
      dwt_real(m, cur, refv[s]);
      cur = refv[s][0];
      cr = new[m * m];
      foreach (cr[i]) cr[i] = real'(ci[i]);
      dwt_real(m, cr, refp[s]);
      transform(m, ci, 0, ll);
      ci = new[(m / 2) * (m / 2)];
      foreach (ci[i]) ci[i] = ll[i] >>> 11;
      m = m / 2;
      for (int b = 0; b < 4; b++) begin
        sig[s][b] = 0.0; err[s][b] = 0.0; sigp[s][b] = 0.0; errp[s][b] = 0.0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < N * N; i++) begin
      @(negedge clk);
      pix_valid = 1;
      pix = 8'(img[i]);
      @(posedge clk);
      while (!pix_ready) @(posedge clk);
      @(negedge clk) pix_valid = 0;
    end
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && band_valid[s]) begin
        automatic int m2 = (N >> s) / 2;
        if (out_cnt[s] < m2 * m2) begin
          automatic real hw [4];
          hw[0] = real'(bands[s].ss) / 2048.0;
          hw[1] = real'(bands[s].sd) / 2048.0;
          hw[2] = real'(bands[s].ds) / 2048.0;
          hw[3] = real'(bands[s].dd) / 2048.0;
          for (int b = 0; b < 4; b++) begin
            automatic real r = refv[s][b][out_cnt[s]];
            automatic real rp = refp[s][b][out_cnt[s]];
            sig[s][b] += r * r;
            err[s][b] += (r - hw[b]) * (r - hw[b]);
            sigp[s][b] += rp * rp;
            errp[s][b] += (rp - hw[b]) * (rp - hw[b]);
          end
        end
        out_cnt[s]++;
      end
    end
  end

  initial begin
    automatic string names [4] = '{"LL", "LH", "HL", "HH"};
    automatic int done = 0;
    while (!done) begin
      @(posedge clk);
      done = 1;
      for (int s = 0; s < STAGES; s++)
        if (out_cnt[s] < ((N >> s) / 2) * ((N >> s) / 2)) done = 0;
    end
    for (int s = 0; s < STAGES; s++)
      for (int b = 0; b < 4; b++) begin
        automatic real db = (err[s][b] == 0.0) ? 300.0 : 10.0 * $log10(sig[s][b] / err[s][b]);
        automatic real dbp = (errp[s][b] == 0.0) ? 300.0 : 10.0 * $log10(sigp[s][b] / errp[s][b]);
        $display("stage %0d %s: SNR end to end %6.2f dB, per stage %6.2f dB", s + 1, names[b], db, dbp);
        checks++;
        if (dbp < MIN_DB) begin
          failures++;
          $display("FAIL: stage %0d %s per-stage SNR below %0.1f dB", s + 1, names[b], MIN_DB);
        end
        if (s == 0) begin
          checks++;
          if (db < MIN_DB) begin
            failures++;
            $display("FAIL: stage 1 %s end-to-end SNR below %0.1f dB", names[b], MIN_DB);
          end
        end
      end
    checks++;
    if (overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * N * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
