// pixel_comparator: equality comparator of the even and odd pixel of a pair.
//
// Its A input is the grey level read from the even-numbered image address, its B
// input the grey level from the odd-numbered address; the output a_eq_b is high
// when both pixels fall in the same histogram bin. That flag steers the increment
// multiplexers: two equal pixels must become one +2 update of a single bin, because
// two writes of +1 to the same word through both memory ports would collide and
// count the pair once. Purely combinational.
module pixel_comparator #(
  parameter int unsigned PIX_W = hist_pkg::DEF_PIX_W
) (
  input  logic [PIX_W-1:0] a,
  input  logic [PIX_W-1:0] b,
  output logic             a_eq_b
);

  always_comb a_eq_b = (a == b);

endmodule
