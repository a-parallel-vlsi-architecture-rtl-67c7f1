// dpwt_shift_buf: a shift registers buffer of LEN words.
//
// Each enabled cycle the buffer shifts by one word: din enters and the word
// that entered LEN enabled cycles earlier is presented on dout. In the
// column accumulator LEN is the number of row sums per row (N/2), so dout is
// the value of the same output column one row earlier. Feeding dout back to
// din (through the caller's multiplexer) circulates the contents, which is
// how boundary data are held for a whole frame.
//
// Interface: en advances the buffer; dout is combinational from the oldest
// word. Implemented as a word array with a rotating pointer, which behaves
// exactly like a chain of LEN registers clocked by en.
//
// Follows the text: the function (row-to-column data format transfer, one
// identical buffer type everywhere, length halving per stage). Own choices:
// the rotating-pointer form and reset of the contents to zero.
module dpwt_shift_buf
  import dpwt_pkg::*;
#(
  parameter int unsigned LEN = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  data_t din,
  output data_t dout
);

  localparam int unsigned AW = (LEN > 1) ? $clog2(LEN) : 1;

  data_t           mem [LEN];
  logic [AW-1:0]   ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int i = 0; i < LEN; i++) mem[i] <= '0;
    end else if (en) begin
      mem[ptr] <= din;
      ptr      <= (ptr == AW'(LEN - 1)) ? '0 : ptr + 1'b1;
    end
  end

endmodule
