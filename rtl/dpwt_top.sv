// dpwt_top: non-separate architecture for the multi-stage 2-D discrete
// periodized wavelet transform (4-tap Daubechies filter).
//
// Data path: the input data controller interleaves the original pixels
// (every other cycle) with the LL coefficients of stages 1 .. STAGES-1; the
// parallel multipliers weight the datum in the slot with the ten distinct
// 2-D filter coefficients; the weighted data go to one data accumulator per
// stage, and only the accumulator whose stage the slot belongs to takes them.
// Each accumulator emits the four subbands of its stage in raster order, and
// its LL coefficient, scaled back by 2^-(p-1), goes back to the controller
// as input of the next stage. Boundaries are periodic, so the subbands allow
// perfect reconstruction.
//
// Interface: pix_valid/pix_ready/pix takes an N x N image in raster order,
// frame after frame; pix_ready is high every other cycle. For stage s
// (index s-1), band_valid marks a coefficient set in bands (SS, SD, DS, DD,
// in units of 2^-(p-1), p = 12) for an (N/2^s) x (N/2^s) subband image.
// overflow is a sticky error flag of the controller queues.
// Timing: a coefficient appears one cycle after the slot that completes it.
// The last subband row of stage k is formed together with the row before it
// and then emitted at the stage's nominal rate (one per 2^(k+1) clocks), so
// it follows the frame by about k row times; no further frame is needed to
// flush it. Frames may follow each other back to back.
//
// Follows the text: the three functional units, one data accumulator per
// stage, N = 16 and three stages as in the text's simulated configuration.
module dpwt_top
  import dpwt_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned STAGES = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pix_valid,
  input  logic [PIX_BITS-1:0] pix,
  output logic                pix_ready,
  output logic                band_valid [STAGES],
  output bands_t              bands      [STAGES],
  output logic                overflow
);

  localparam int unsigned SW = $clog2(STAGES + 1);

  initial assert ((N >> (STAGES - 1)) >= 4)
    else $error("dpwt_top: the last stage needs an image of at least 4 x 4");

  logic          slot_valid;
  logic [SW-1:0] slot_stage;
  data_t         slot_data;
  data_t         w [D][D];
  logic          ss_valid [STAGES];
  data_t         ss       [STAGES];

  dpwt_input_ctrl #(.STAGES(STAGES)) u_ctrl (
    .clk, .rst_n,
    .pix_valid, .pix, .pix_ready,
    .ss_valid, .ss,
    .slot_valid, .slot_stage, .slot_data,
    .overflow
  );

  dpwt_par_mult u_mult (
    .x (slot_data),
    .w (w)
  );

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic en;
    assign en = slot_valid && (slot_stage == SW'(s));
    dpwt_data_acc #(.N(N >> s), .GAP(4 << s)) u_acc (
      .clk, .rst_n,
      .en,
      .w,
      .out_valid (band_valid[s]),
      .out       (bands[s]),
      .ss_next   (ss[s])
    );
    assign ss_valid[s] = band_valid[s];
  end

endmodule
