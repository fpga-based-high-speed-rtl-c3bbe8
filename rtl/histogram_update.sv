// histogram_update: increment units and multiplexers of the two-way histogram.
//
// Inputs are the old counts read from the histogram memory for the even pixel's
// grey level (port A, count_x) and the odd pixel's grey level (port B, count_y), and
// the comparator flag pix_equal. Each lane has a +1 incrementer, and a +2 unit
// serves the case of equal pixels; multiplexers selected by pix_equal pick the
// value and enable written back:
//   pixels differ : bin X <- count_x + 1 (port A), bin Y <- count_y + 1 (port B)
//   pixels equal  : bin Y <- count_y + 2 (port B); the even pixel's write is dropped
// Which port carries the single +2 write when the pixels are equal is a choice: it
// follows the description that increments the odd pixel's entry by two and ignores
// the even one. Counts wrap modulo 2^CNT_W; CNT_W is sized so that a full image
// cannot overflow a bin. Purely combinational.
module histogram_update #(
  parameter int unsigned CNT_W = hist_pkg::count_width(hist_pkg::DEF_IMG_W * hist_pkg::DEF_IMG_H)
) (
  input  logic             pix_equal,
  input  logic [CNT_W-1:0] count_x,
  input  logic [CNT_W-1:0] count_y,
  output logic             we_x,
  output logic [CNT_W-1:0] new_x,
  output logic             we_y,
  output logic [CNT_W-1:0] new_y
);

  logic [CNT_W-1:0] inc1_x, inc1_y, inc2_y;

  always_comb begin
    inc1_x = count_x + CNT_W'(1);
    inc1_y = count_y + CNT_W'(1);
    inc2_y = count_y + CNT_W'(2);
    // lane X (even pixel): written only when the pixels differ
    we_x   = !pix_equal;
    new_x  = inc1_x;
    // lane Y (odd pixel): +1 or +2
    we_y   = 1'b1;
    new_y  = pix_equal ? inc2_y : inc1_y;
  end

endmodule
