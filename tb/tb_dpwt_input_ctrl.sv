// tb_dpwt_input_ctrl: random pixel stream plus random SS values from stages
// 1 and 2 (at most one per four cycles per stage). A queue model predicts
// every slot: even slots (pix_ready high) carry the offered pixel as stage 0,
// odd slots the oldest SS value of the lowest-numbered stage that has one,
// tagged with the next stage. Also checks that pix_ready alternates and that
// the overflow flag stays low.
module tb_dpwt_input_ctrl;
  import dpwt_pkg::*;

  localparam int STAGES = 3;
  localparam int SW = $clog2(STAGES + 1);

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [PIX_BITS-1:0] pix = 0;
  logic pix_ready;
  logic ss_valid [STAGES];
  data_t ss [STAGES];
  logic slot_valid;
  logic [SW-1:0] slot_stage;
  data_t slot_data;
  logic overflow;
  int checks = 0, failures = 0;
  data_t mq [STAGES][$];
  int n_stage [STAGES + 1] = '{default: 0};
  int last_push [STAGES] = '{default: -10};

  dpwt_input_ctrl #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    bit exp_valid, prev_ready;
    int exp_stage;
    data_t exp_data;
    for (int s = 0; s < STAGES; s++) begin ss_valid[s] = 0; ss[s] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev_ready = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      pix_valid = ($urandom_range(0, 4) != 0);
      pix = PIX_BITS'($urandom);
      for (int s = 0; s < STAGES; s++) begin
        ss_valid[s] = (t - last_push[s] >= 4) && ($urandom_range(0, 2 * s + 1) == 0);
        ss[s] = data_t'($urandom_range(0, 2000) - 1000);
        if (ss_valid[s]) last_push[s] = t;
      end
      #1;
      if (t > 0) check(pix_ready != prev_ready, "pix_ready does not alternate");
      prev_ready = pix_ready;
      exp_valid = 0;
      exp_stage = 0;
      exp_data = '0;
      if (pix_ready) begin
        exp_valid = pix_valid;
        exp_data = data_t'({1'b0, pix});
      end else begin
        for (int s = STAGES - 2; s >= 0; s--)
          if (mq[s].size() > 0) begin
            exp_valid = 1;
            exp_stage = s + 1;
          end
        if (exp_valid) exp_data = mq[exp_stage - 1].pop_front();
      end
      for (int s = 0; s < STAGES - 1; s++) if (ss_valid[s]) mq[s].push_back(ss[s]);
      @(posedge clk);
      #1;
      check(slot_valid == exp_valid, $sformatf("t%0d slot_valid %0b exp %0b", t, slot_valid, exp_valid));
      if (exp_valid) begin
        check(int'(slot_stage) == exp_stage, $sformatf("t%0d stage %0d exp %0d", t, slot_stage, exp_stage));
        check(slot_data == exp_data, $sformatf("t%0d data %0d exp %0d", t, slot_data, exp_data));
        n_stage[exp_stage]++;
      end
      check(!overflow, "overflow");
    end
    for (int s = 0; s < STAGES; s++) check(n_stage[s] > 0, $sformatf("no slot for stage %0d", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
