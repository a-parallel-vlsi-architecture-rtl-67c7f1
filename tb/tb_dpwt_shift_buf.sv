// tb_dpwt_shift_buf: the buffer must return, on each enabled cycle, the word
// written LEN enabled cycles earlier (zero during the first LEN), and must
// not move while en is low. Enable is random.
module tb_dpwt_shift_buf;
  import dpwt_pkg::*;

  localparam int LEN = 5;
  logic clk = 0, rst_n = 0, en = 0;
  data_t din = '0, dout;
  int checks = 0, failures = 0;
  data_t model [$];

  dpwt_shift_buf #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < LEN; i++) model.push_back('0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      en  = ($urandom_range(0, 2) != 0);
      din = data_t'($urandom);
      #1;
      checks++;
      if (dout != model[0]) begin
        failures++;
        if (failures < 10) $display("FAIL: dout=%0d exp %0d", dout, model[0]);
      end
      @(posedge clk);
      if (en) begin
        void'(model.pop_front());
        model.push_back(din);
      end
    end
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
