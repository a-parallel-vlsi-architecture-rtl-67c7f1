// dpwt_stage_ctrl: timing control for the row accumulators of one stage.
//
// Counts the column position x (0 .. N-1) of the data that belong to this
// stage and decodes the strobes the row accumulators need: x = 0 and x = 1
// (capture of the column boundary data), x = N-1 (formation of the wrapped
// sum) and the row-sum valid signal. A row sum is valid at odd x >= 3
// (normal outputs, decimation by two) and in the cycle right after the
// x = N-1 datum (wrap_tick: the wrapped output of that row, taken from the
// row accumulators' delay registers). That cycle never carries data of the
// same stage, because a stage gets at most one datum every two cycles; an
// assertion checks this.
//
// Interface: en marks a datum of this stage in the input slot; col_* are
// combinational and must be qualified by en; wrap_tick is registered.
//
// The text only asks for "a simple control unit"; the counter and decoding
// here are this design's own.
module dpwt_stage_ctrl #(
  parameter int unsigned N = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic col_first,
  output logic col_second,
  output logic col_last,
  output logic wrap_tick,
  output logic rs_valid
);

  localparam int unsigned XW = $clog2(N);

  logic [XW-1:0] x;

  always_comb begin
    col_first  = (x == '0);
    col_second = (x == XW'(1));
    col_last   = (x == XW'(N - 1));
    rs_valid   = (en && x[0] && x >= XW'(3)) || wrap_tick;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      wrap_tick <= 1'b0;
    end else begin
      wrap_tick <= en && col_last;
      if (en) x <= x + 1'b1;  // N is a power of two: wraps to 0 after N-1
    end
  end

  a_no_data_on_wrap: assert property (@(posedge clk) !(wrap_tick && en))
    else $error("dpwt_stage_ctrl: datum in the wrap-tick cycle");

endmodule
