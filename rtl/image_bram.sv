// image_bram: dual-ported block memory holding the grey-level image.
//
// One word per pixel: PIX_W bits wide, IMG_W*IMG_H words deep (128 x 128 x 8 bits by
// default), as the image memory of the two-way histogram unit is sized by bits per
// pixel and pixel count. Port A reads the even-numbered pixel and port B the
// odd-numbered one, so a pixel pair is fetched in a single cycle.
//
// Port A also carries a write enable: this is how the image is loaded before a run
// (on an FPGA the memory could instead be initialised from a bitstream file; loading
// through a port is this design's choice). Port B is read-only.
//
// Timing: synchronous read with one cycle of latency on both ports (address sampled
// on a rising edge, data valid after it), like an FPGA block RAM. A write on port A
// is not forwarded to its own read data in the same cycle (read-first).
module image_bram #(
  parameter int unsigned PIX_W  = hist_pkg::DEF_PIX_W,
  parameter int unsigned DEPTH  = hist_pkg::DEF_IMG_W * hist_pkg::DEF_IMG_H,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A: read/write
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [PIX_W-1:0]  a_wdata,
  output logic [PIX_W-1:0]  a_rdata,
  // port B: read
  input  logic [ADDR_W-1:0] b_addr,
  output logic [PIX_W-1:0]  b_rdata
);

  logic [PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
