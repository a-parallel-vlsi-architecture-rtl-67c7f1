// dpwt_input_ctrl: the input data controller.
//
// Builds the single data sequence that feeds the parallel multipliers: the
// original image data (stage 1) take every other slot of the system clock,
// and the free slots in between carry the LL coefficients SS produced by
// stage k, which are the input data of stage k+1. This is the interleaved
// input format in which all stages share one set of multipliers.
//
// How it works: a free-running phase bit splits the cycles into even slots
// (original data) and odd slots (next-stage data). Each stage k < STAGES
// hands its SS values to a small queue (its "switch buffer"); in an odd slot
// the lowest-numbered non-empty queue is switched into the slot register.
// Each queue is written in the order its stage produces SS, i.e. raster order
// of that stage's image, so every stage sees an in-order stream.
//
// Interface: pix_valid/pix_ready is a valid/ready handshake for 8-bit
// unsigned pixels; pix_ready is high in even slots. ss_valid[k]/ss[k] is the
// SS output of stage k (index 0 is stage 1); the last stage's input is
// unused. slot_valid/slot_stage/slot_data is the registered slot: the datum
// and the index of the stage it belongs to. overflow is a sticky flag set if
// a queue ever overflows (cannot happen with the default depth, and is
// asserted against).
// Timing: a pixel accepted in cycle t is in the slot register in cycle t+1.
//
// Follows the text: original data at half the system clock rate with the
// SS values of later stages interspersed. The text draws the controller as a
// shift register with switches at fixed positions but gives no positions;
// the phase bit and the queues are this design's own way of doing it.
module dpwt_input_ctrl
  import dpwt_pkg::*;
#(
  parameter int unsigned STAGES = 3,
  parameter int unsigned QDEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       pix_valid,
  input  logic [PIX_BITS-1:0]        pix,
  output logic                       pix_ready,
  input  logic                       ss_valid [STAGES],
  input  data_t                      ss       [STAGES],
  output logic                       slot_valid,
  output logic [$clog2(STAGES+1)-1:0] slot_stage,
  output data_t                      slot_data,
  output logic                       overflow
);

  localparam int unsigned SW = $clog2(STAGES + 1);
  localparam int unsigned QW = $clog2(QDEPTH);
  localparam int unsigned NQ = (STAGES > 1) ? STAGES - 1 : 1;
  localparam int unsigned QSW = (NQ > 1) ? $clog2(NQ) : 1;

  logic phase;  // 0: even slot (original data), 1: odd slot (SS data)

  assign pix_ready = ~phase;

  // Queues: queue k holds SS of stage k+1 (index k), input of stage k+2.
  data_t         q_mem  [NQ][QDEPTH];
  logic [QW-1:0] q_rd   [NQ];
  logic [QW-1:0] q_wr   [NQ];
  logic [QW:0]   q_cnt  [NQ];
  logic          q_pop  [NQ];
  logic          q_push [NQ];

  // Odd-slot arbitration: lowest-numbered non-empty queue wins.
  logic          sel_any;
  logic [SW-1:0] sel_q;
  always_comb begin
    sel_any = 1'b0;
    sel_q   = '0;
    for (int k = NQ - 1; k >= 0; k--) begin
      if (STAGES > 1 && q_cnt[k] != '0) begin
        sel_any = 1'b1;
        sel_q   = SW'(k);
      end
    end
    for (int k = 0; k < NQ; k++) begin
      q_pop[k]  = phase && sel_any && (sel_q == SW'(k));
      q_push[k] = (STAGES > 1) && ss_valid[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= 1'b0;
      slot_valid <= 1'b0;
      slot_stage <= '0;
      slot_data  <= '0;
      overflow   <= 1'b0;
      for (int k = 0; k < NQ; k++) begin
        q_rd[k]  <= '0;
        q_wr[k]  <= '0;
        q_cnt[k] <= '0;
        for (int i = 0; i < QDEPTH; i++) q_mem[k][i] <= '0;
      end
    end else begin
      phase <= ~phase;
      if (!phase) begin
        slot_valid <= pix_valid;
        slot_stage <= '0;
        slot_data  <= data_t'({1'b0, pix});
      end else begin
        slot_valid <= sel_any;
        slot_stage <= sel_q + 1'b1;
        slot_data  <= q_mem[QSW'(sel_q)][q_rd[QSW'(sel_q)]];
      end
      for (int k = 0; k < NQ; k++) begin
        if (q_push[k]) begin
          if (q_cnt[k] == (QW+1)'(QDEPTH) && !q_pop[k]) begin
            overflow <= 1'b1;
          end else begin
            q_mem[k][q_wr[k]] <= ss[k];
            q_wr[k]           <= q_wr[k] + 1'b1;
          end
        end
        if (q_pop[k]) q_rd[k] <= q_rd[k] + 1'b1;
        case ({q_push[k] && !(q_cnt[k] == (QW+1)'(QDEPTH) && !q_pop[k]), q_pop[k]})
          2'b10:   q_cnt[k] <= q_cnt[k] + 1'b1;
          2'b01:   q_cnt[k] <= q_cnt[k] - 1'b1;
          default: ;
        endcase
      end
    end
  end

  for (genvar k = 0; k < NQ; k++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(q_push[k] && q_cnt[k] == (QW+1)'(QDEPTH) && !q_pop[k]))
      else $error("dpwt_input_ctrl: queue %0d overflow", k);
  end

endmodule
