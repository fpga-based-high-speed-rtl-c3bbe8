// parallel_histogram_top: two-way parallel histogram unit for grey-level images.
//
// The histogram of an image counts, for every grey level, how many pixels have it.
// A single-port unit needs three cycles per pixel (read pixel, read count, write
// count+1). This unit reads two pixels per access from a dual-ported image memory,
// the even-numbered and the odd-numbered one, and updates two bins at once in a
// dual-ported histogram memory. When both pixels have the same grey level the two
// ports would write the same word, so a comparator detects the case and the pair
// becomes a single +2 update of that bin. The result is three cycles per pixel pair:
// 24576 cycles for a 128 x 128, 8-bit image instead of 49152.
//
// Blocks: image_bram (pixel store), pixel_comparator (X == Y), histogram_update
// (+1/+1/+2 units and multiplexers), histogram_bram (counts), histogram_controller
// (clear, pair sequencing, cycle count, load/read-out ports).
//
// Use: hold rst_n low for a cycle. While busy is low, write the image through
// load_we/load_addr/load_data (one pixel per cycle, row-major order is the natural
// choice but any order gives the same histogram). Pulse start; busy rises, done
// pulses once after 256/2 clear cycles plus 3*NPIX/2 compute cycles, and
// compute_cycles then holds the compute-cycle count. Read bin b by driving
// rd_addr = b while busy is low; rd_count shows its count one cycle later.
module parallel_histogram_top #(
  parameter int unsigned IMG_W = hist_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = hist_pkg::DEF_IMG_H,
  parameter int unsigned PIX_W = hist_pkg::DEF_PIX_W,
  parameter int unsigned NPIX  = IMG_W * IMG_H,
  parameter int unsigned BINS  = 2 ** PIX_W,
  parameter int unsigned CNT_W = hist_pkg::count_width(NPIX),
  parameter int unsigned IMG_AW = $clog2(NPIX),
  parameter int unsigned CYC_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // image load (while not busy)
  input  logic              load_we,
  input  logic [IMG_AW-1:0] load_addr,
  input  logic [PIX_W-1:0]  load_data,
  // run control
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [CYC_W-1:0]  compute_cycles,
  // histogram read-out (while not busy), one cycle latency
  input  logic [PIX_W-1:0]  rd_addr,
  output logic [CNT_W-1:0]  rd_count
);

  logic              img_a_we;
  logic [IMG_AW-1:0] img_a_addr, img_b_addr;
  logic [PIX_W-1:0]  img_a_wdata, img_a_rdata, img_b_rdata;
  logic              pix_equal, pix_equal_q;
  logic              upd_we_x, upd_we_y;
  logic [CNT_W-1:0]  upd_new_x, upd_new_y;
  logic              hist_a_we, hist_b_we;
  logic [PIX_W-1:0]  hist_a_addr, hist_b_addr;
  logic [CNT_W-1:0]  hist_a_wdata, hist_b_wdata, hist_a_rdata, hist_b_rdata;

  image_bram #(.PIX_W(PIX_W), .DEPTH(NPIX), .ADDR_W(IMG_AW)) u_image (
    .clk     (clk),
    .a_we    (img_a_we),
    .a_addr  (img_a_addr),
    .a_wdata (img_a_wdata),
    .a_rdata (img_a_rdata),
    .b_addr  (img_b_addr),
    .b_rdata (img_b_rdata)
  );

  pixel_comparator #(.PIX_W(PIX_W)) u_cmp (
    .a      (img_a_rdata),
    .b      (img_b_rdata),
    .a_eq_b (pix_equal)
  );

  histogram_update #(.CNT_W(CNT_W)) u_update (
    .pix_equal (pix_equal_q),
    .count_x   (hist_a_rdata),
    .count_y   (hist_b_rdata),
    .we_x      (upd_we_x),
    .new_x     (upd_new_x),
    .we_y      (upd_we_y),
    .new_y     (upd_new_y)
  );

  histogram_bram #(.BINS(BINS), .CNT_W(CNT_W), .ADDR_W(PIX_W)) u_hist (
    .clk     (clk),
    .a_we    (hist_a_we),
    .a_addr  (hist_a_addr),
    .a_wdata (hist_a_wdata),
    .a_rdata (hist_a_rdata),
    .b_we    (hist_b_we),
    .b_addr  (hist_b_addr),
    .b_wdata (hist_b_wdata),
    .b_rdata (hist_b_rdata)
  );

  histogram_controller #(
    .PIX_W(PIX_W), .NPIX(NPIX), .CNT_W(CNT_W), .IMG_AW(IMG_AW), .BINS(BINS), .CYC_W(CYC_W)
  ) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .busy           (busy),
    .done           (done),
    .compute_cycles (compute_cycles),
    .ext_load_we    (load_we),
    .ext_load_addr  (load_addr),
    .ext_load_data  (load_data),
    .ext_rd_addr    (rd_addr),
    .img_a_we       (img_a_we),
    .img_a_addr     (img_a_addr),
    .img_a_wdata    (img_a_wdata),
    .img_b_addr     (img_b_addr),
    .img_a_rdata    (img_a_rdata),
    .img_b_rdata    (img_b_rdata),
    .pix_equal      (pix_equal),
    .pix_equal_q    (pix_equal_q),
    .upd_we_x       (upd_we_x),
    .upd_new_x      (upd_new_x),
    .upd_we_y       (upd_we_y),
    .upd_new_y      (upd_new_y),
    .hist_a_we      (hist_a_we),
    .hist_a_addr    (hist_a_addr),
    .hist_a_wdata   (hist_a_wdata),
    .hist_b_we      (hist_b_we),
    .hist_b_addr    (hist_b_addr),
    .hist_b_wdata   (hist_b_wdata)
  );

  always_comb rd_count = hist_a_rdata;

endmodule
