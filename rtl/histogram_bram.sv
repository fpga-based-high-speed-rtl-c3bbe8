// histogram_bram: true dual-ported block memory holding the histogram counts.
//
// BINS words (2^bpp = 256 by default), each CNT_W bits wide. Both ports can read and
// write, so during the computation the counts of two different grey levels are read
// and written back in the same cycles: port A serves the grey level of the
// even-numbered pixel and port B that of the odd-numbered one.
//
// Timing: synchronous read, one cycle of latency, read-first on each port. The
// surrounding logic guarantees that the two ports never write the same word in one
// cycle (equal grey levels are merged into one +2 update before the write); the
// assertion below checks that rule.
module histogram_bram #(
  parameter int unsigned BINS   = 2 ** hist_pkg::DEF_PIX_W,
  parameter int unsigned CNT_W  = hist_pkg::count_width(hist_pkg::DEF_IMG_W * hist_pkg::DEF_IMG_H),
  parameter int unsigned ADDR_W = $clog2(BINS)
) (
  input  logic              clk,
  // port A
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [CNT_W-1:0]  a_wdata,
  output logic [CNT_W-1:0]  a_rdata,
  // port B
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [CNT_W-1:0]  b_wdata,
  output logic [CNT_W-1:0]  b_rdata
);

  logic [CNT_W-1:0] mem [BINS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    b_rdata <= mem[b_addr];
  end

  // Two writes to one word in the same cycle would leave it undefined.
  a_no_write_collision : assert property (@(posedge clk) !(a_we && b_we && a_addr == b_addr))
    else $error("histogram_bram: both ports write bin %0d in one cycle", a_addr);

endmodule
