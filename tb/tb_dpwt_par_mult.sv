// tb_dpwt_par_mult: checks all 16 weighted outputs of the parallel
// multipliers against x * c(k,l), with c(k,l) recomputed in floating point
// by the reference package, for boundary and random data values.
module tb_dpwt_par_mult;
  import dpwt_pkg::*;
  import dpwt_ref_pkg::*;

  data_t x;
  data_t w [D][D];
  int checks = 0, failures = 0;

  dpwt_par_mult dut (.x, .w);

  task automatic try_value(input int v);
    x = data_t'(v);
    #1;
    for (int k = 0; k < D; k++)
      for (int l = 0; l < D; l++) begin
        longint e = longint'(v) * ref_coef(k, l);
        checks++;
        if (longint'(w[k][l]) != e) begin
          failures++;
          $display("FAIL: x=%0d w[%0d][%0d]=%0d exp %0d", v, k, l, w[k][l], e);
        end
      end
  endtask

  initial begin
    try_value(0);
    try_value(1);
    try_value(255);
    try_value(-1);
    try_value(-300);
    repeat (200) try_value($urandom_range(0, 1200) - 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
