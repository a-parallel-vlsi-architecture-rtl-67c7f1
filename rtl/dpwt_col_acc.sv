// dpwt_col_acc: the column accumulator of one decomposition stage.
//
// Input: on each rs_valid, the row sums of the four row accumulators for one
// output column, rl[k] (horizontal low-pass, from operator row k) and rh[k]
// (horizontal high-pass). Each row of an N x N image yields N/2 row sums, in
// column order.
//
// The row sums of d = 4 consecutive rows are added column-wise with a
// transposed systolic chain in which every register is a shift registers
// buffer of N/2 words, so that each stage of the chain lines up with the same
// column of the previous row:
//   vertical low  (LL from rl, LH from rh), top to bottom:
//     out(n1) = R[0](2n1) + R[1](2n1+1) + R[2](2n1+2) + R[3](2n1+3)
//   vertical high (HL from rl, HH from rh), bottom to top, alternating signs:
//     out(n1) = -R[3](2n1) + R[2](2n1+1) - R[1](2n1+2) + R[0](2n1+3)
// Outputs are produced at odd rows r >= 3 (n1 = (r-3)/2).
//
// Row boundary (periodic wrap): the last output row n1 = N/2-1 needs rows
// N-2, N-1, 0, 1. The contribution of rows 0 and 1 is formed while they pass
// and then held in a boundary-data-holding buffer that circulates through a
// multiplexer for the rest of the frame. At row N-1 it is added to the
// partial sum of rows N-2 and N-1, so the last two output rows are formed
// together; the last one goes into a last-row buffer. Once row N-1 is
// complete the buffer is shifted out on its own, one coefficient every GAP
// clocks, so the last row follows the frame within one row scan time and
// does not wait for the next frame; the output stays in raster order for
// the next stage. A drain step is postponed by a cycle if rs_valid is high.
// The drain must end before the next frame reaches row 3; in the engine it
// ends after about one row time.
//
// Output: out_valid with the four band values (scale 2^(p-1) relative to the
// input) and ss_next = SS arithmetically shifted right by p-1 bits, the LL
// value passed to the next stage. All outputs are registered: they appear
// one cycle after the rs_valid that completes them (the drained last row:
// one cycle after its drain step).
//
// Follows the text: accumulation directions per band pair, shift registers
// buffers, boundary holding with recirculating multiplexer, simultaneous
// last two rows with the last delayed by one row scan, right shift by p-1.
// Own choices: the row and column counters, reset values, truncating shift,
// the drain spacing GAP.
module dpwt_col_acc
  import dpwt_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter int unsigned GAP = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rs_valid,
  input  data_t  rl [D],
  input  data_t  rh [D],
  output logic   out_valid,
  output bands_t out,
  output data_t  ss_next
);

  localparam int unsigned W  = N / 2;
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned RW = $clog2(N);

  initial assert (N >= 4 && (N & (N - 1)) == 0)
    else $error("dpwt_col_acc: N must be a power of two >= 4");

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  // Drain of the last-row buffer.
  logic [CW:0]   drain_left;
  logic [$clog2(GAP+1)-1:0] drain_wait;
  logic          drain_tick;
  logic          lr_en;

  logic row_first, row_second, row_last, row_emit;
  always_comb begin
    row_first  = (row == '0);
    row_second = (row == RW'(1));
    row_last   = (row == RW'(N - 1));
    row_emit   = row[0] && (row >= RW'(3));
    drain_tick = (drain_left != '0) && (drain_wait == '0) && !rs_valid;
    lr_en      = (rs_valid && row_last) || drain_tick;
  end

  // Per horizontal band (0: rl, 1: rh): vertical low, vertical high and the
  // delayed last-row values.
  data_t vlo [2], vhi [2], llo [2], lhi [2];

  for (genvar b = 0; b < 2; b++) begin : g_band
    data_t r [D];
    for (genvar k = 0; k < D; k++) begin : g_sel
      assign r[k] = (b == 0) ? rl[k] : rh[k];
    end

    data_t a1_q, a2_q, a3_q, ba_q, la_q;
    data_t c1_q, c2_q, c3_q, bb_q, lb_q;
    data_t ba_d, bb_d, wa, wb;

    // Vertical low-pass chain (downward).
    dpwt_shift_buf #(.LEN(W)) u_a1 (.clk, .rst_n, .en(rs_valid), .din(r[0]),        .dout(a1_q));
    dpwt_shift_buf #(.LEN(W)) u_a2 (.clk, .rst_n, .en(rs_valid), .din(a1_q + r[1]), .dout(a2_q));
    dpwt_shift_buf #(.LEN(W)) u_a3 (.clk, .rst_n, .en(rs_valid), .din(a2_q + r[2]), .dout(a3_q));
    assign vlo[b] = a3_q + r[3];

    // Vertical high-pass chain (upward, alternating signs).
    dpwt_shift_buf #(.LEN(W)) u_c1 (.clk, .rst_n, .en(rs_valid), .din('0 - r[3]),   .dout(c1_q));
    dpwt_shift_buf #(.LEN(W)) u_c2 (.clk, .rst_n, .en(rs_valid), .din(c1_q + r[2]), .dout(c2_q));
    dpwt_shift_buf #(.LEN(W)) u_c3 (.clk, .rst_n, .en(rs_valid), .din(c2_q - r[1]), .dout(c3_q));
    assign vhi[b] = c3_q + r[0];

    // Boundary data holding: rows 0 and 1 are accumulated, then circulated.
    always_comb begin
      if (row_first)       ba_d = r[2];
      else if (row_second) ba_d = ba_q + r[3];
      else                 ba_d = ba_q;
      if (row_first)       bb_d = '0 - r[1];
      else if (row_second) bb_d = bb_q + r[0];
      else                 bb_d = bb_q;
      // Wrapped sums, meaningful at row N-1.
      wa = a1_q + r[1] + ba_q;
      wb = c1_q + r[2] + bb_q;
    end
    dpwt_shift_buf #(.LEN(W)) u_ba (.clk, .rst_n, .en(rs_valid), .din(ba_d), .dout(ba_q));
    dpwt_shift_buf #(.LEN(W)) u_bb (.clk, .rst_n, .en(rs_valid), .din(bb_d), .dout(bb_q));

    // Last-row buffers: filled during row N-1, then shifted out by the
    // drain (what is shifted in while draining is never read).
    dpwt_shift_buf #(.LEN(W)) u_la (.clk, .rst_n, .en(lr_en), .din(wa), .dout(la_q));
    dpwt_shift_buf #(.LEN(W)) u_lb (.clk, .rst_n, .en(lr_en), .din(wb), .dout(lb_q));
    assign llo[b] = la_q;
    assign lhi[b] = lb_q;
  end

  // Position counters of the row-sum stream and the drain control.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col        <= '0;
      row        <= '0;
      drain_left <= '0;
      drain_wait <= '0;
    end else begin
      if (rs_valid) begin
        if (col == CW'(W - 1)) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
      if (rs_valid && row_last && col == CW'(W - 1)) begin
        drain_left <= (CW+1)'(W);
        drain_wait <= ($clog2(GAP+1))'(GAP - 1);
      end else if (drain_tick) begin
        drain_left <= drain_left - 1'b1;
        drain_wait <= ($clog2(GAP+1))'(GAP - 1);
      end else if (drain_wait != '0) begin
        drain_wait <= drain_wait - 1'b1;
      end
    end
  end

  // Raster order: the last row must be out before the next frame's first
  // output row (row 3) is produced.
  a_drain_done: assert property (@(posedge clk) disable iff (!rst_n)
    !(rs_valid && row_emit && drain_left != '0))
    else $error("dpwt_col_acc: last row still draining when the next frame's outputs start");

  // Output register and the (p-1)-bit right shift of the LL value.
  bands_t nxt;
  always_comb begin
    if (drain_tick) nxt = '{ss: llo[0], sd: llo[1], ds: lhi[0], dd: lhi[1]};
    else            nxt = '{ss: vlo[0], sd: vlo[1], ds: vhi[0], dd: vhi[1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      ss_next   <= '0;
    end else begin
      out_valid <= (rs_valid && row_emit) || drain_tick;
      if (rs_valid || drain_tick) begin
        out     <= nxt;
        ss_next <= nxt.ss >>> (P_BITS - 1);
      end
    end
  end

endmodule
