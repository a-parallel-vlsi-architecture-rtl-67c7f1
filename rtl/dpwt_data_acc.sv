// dpwt_data_acc: the data accumulator of one decomposition stage.
//
// Holds d = 4 row accumulators, one per row k of the 4x4 operator, fed with
// the weighted data w[k][0..3] of the parallel multipliers, and one column
// accumulator that combines their low and high row sums into the four
// subbands LL (SS), LH (SD), HL (DS) and HH (DD) of an N x N input image.
// All data accumulators are identical apart from N, which halves from stage
// to stage; each advances only on the data of its own stage (en), so its
// effective clock rate is the rate of its data, f_s / 2^k for stage k.
//
// Interface: en marks an input slot holding a datum of this stage, w are the
// weighted data of that datum. out_valid/out carry the subband coefficients,
// ss_next the LL value scaled back by 2^-(p-1) for the next stage.
// GAP is the spacing, in clocks, of the last subband row's outputs, which
// are emitted after the frame without waiting for further data (the top
// sets it to the stage's nominal output spacing, 2^(k+1) for stage k).
// Timing: a coefficient appears one clock after the datum that completes it,
// except the last subband row, which follows the frame's last datum at one
// coefficient per GAP clocks (one row scan time). Output order is raster
// order of the N/2 x N/2 subband images.
//
// Follows the text: composition of d row accumulators and one column
// accumulator per stage, independent processing of each stage.
module dpwt_data_acc
  import dpwt_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter int unsigned GAP = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  data_t  w [D][D],
  output logic   out_valid,
  output bands_t out,
  output data_t  ss_next
);

  logic col_first, col_second, col_last, wrap_tick, rs_valid;

  dpwt_stage_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .en,
    .col_first, .col_second, .col_last, .wrap_tick, .rs_valid
  );

  data_t rl [D], rh [D];

  for (genvar k = 0; k < D; k++) begin : g_row
    dpwt_row_acc u_ra (
      .clk, .rst_n, .en,
      .col_first  (col_first),
      .col_second (col_second),
      .col_last   (col_last),
      .sel_wrap   (wrap_tick),
      .p          (w[k]),
      .low        (rl[k]),
      .high       (rh[k])
    );
  end

  dpwt_col_acc #(.N(N), .GAP(GAP)) u_ca (
    .clk, .rst_n,
    .rs_valid,
    .rl, .rh,
    .out_valid, .out, .ss_next
  );

endmodule
