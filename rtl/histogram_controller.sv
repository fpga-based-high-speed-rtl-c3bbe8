// histogram_controller: sequencer of the two-way parallel histogram computation.
//
// After start it first clears the histogram memory, two bins per cycle through both
// ports (BINS/2 cycles). It then processes the image as pixel pairs: pair k is the
// even-numbered pixel 2k (image port A) and the odd-numbered pixel 2k+1 (image
// port B). Each pair takes three clock cycles, as in the three-cycle scheme the
// design is built on:
//   ST_RD_IMG  : image addresses 2k and 2k+1 are presented to the image memory
//   ST_RD_HIST : the pixel pair X, Y is valid; it is registered together with the
//                comparator's X == Y flag and used as the two histogram addresses
//   ST_WR_HIST : the old counts are valid; the increment unit's results are written
//                back through both histogram ports (one +2 write if X == Y)
// So N pixels take 3*N/2 cycles (24576 = 6000h for 128 x 128), half the 3*N of a
// one-port, one-pixel-at-a-time unit. A write in ST_WR_HIST lands before the next
// pair's histogram read, so back-to-back pairs with shared grey levels see the
// updated counts without any forwarding.
//
// compute_cycles counts the cycles spent in the three compute states of the last
// run (clearing excluded) and holds its value until the next start. done pulses for
// one cycle at the end; busy is high from the cycle after start until done.
//
// While idle the controller hands image port A to the load interface (ext_load_*)
// and histogram port A to the read-out interface (ext_rd_addr; data appears on the
// histogram memory's port A one cycle later). The clear phase, the load and read-out
// ports and the active-low synchronous reset are this design's own choices. The
// pixel count must be even.
module histogram_controller #(
  parameter int unsigned PIX_W   = hist_pkg::DEF_PIX_W,
  parameter int unsigned NPIX    = hist_pkg::DEF_IMG_W * hist_pkg::DEF_IMG_H,
  parameter int unsigned CNT_W   = hist_pkg::count_width(NPIX),
  parameter int unsigned IMG_AW  = $clog2(NPIX),
  parameter int unsigned BINS    = 2 ** PIX_W,
  parameter int unsigned CYC_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [CYC_W-1:0]  compute_cycles,
  // load interface (used while idle)
  input  logic              ext_load_we,
  input  logic [IMG_AW-1:0] ext_load_addr,
  input  logic [PIX_W-1:0]  ext_load_data,
  // read-out interface (used while idle)
  input  logic [PIX_W-1:0]  ext_rd_addr,
  // image memory
  output logic              img_a_we,
  output logic [IMG_AW-1:0] img_a_addr,
  output logic [PIX_W-1:0]  img_a_wdata,
  output logic [IMG_AW-1:0] img_b_addr,
  input  logic [PIX_W-1:0]  img_a_rdata,
  input  logic [PIX_W-1:0]  img_b_rdata,
  // comparator
  input  logic              pix_equal,
  output logic              pix_equal_q,
  // increment unit
  input  logic              upd_we_x,
  input  logic [CNT_W-1:0]  upd_new_x,
  input  logic              upd_we_y,
  input  logic [CNT_W-1:0]  upd_new_y,
  // histogram memory
  output logic              hist_a_we,
  output logic [PIX_W-1:0]  hist_a_addr,
  output logic [CNT_W-1:0]  hist_a_wdata,
  output logic              hist_b_we,
  output logic [PIX_W-1:0]  hist_b_addr,
  output logic [CNT_W-1:0]  hist_b_wdata
);
  import hist_pkg::*;

  localparam int unsigned NPAIR  = NPIX / 2;
  localparam int unsigned PAIR_W = (NPAIR > 1) ? $clog2(NPAIR) : 1;
  localparam int unsigned CLR_W  = (BINS > 2) ? $clog2(BINS / 2) : 1;

  if (NPIX % 2 != 0 || NPIX < 2) begin : g_bad_npix
    $error("histogram_controller: NPIX must be even and at least 2");
  end

  hist_state_e       state_q;
  logic [PAIR_W-1:0] pair_q;
  logic [CLR_W-1:0]  clr_q;
  logic [PIX_W-1:0]  x_q, y_q;
  logic [CYC_W-1:0]  cyc_q;

  logic last_pair, last_clr;
  always_comb begin
    last_pair = (pair_q == PAIR_W'(NPAIR - 1));
    last_clr  = (clr_q == CLR_W'(BINS / 2 - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= ST_IDLE;
      pair_q      <= '0;
      clr_q       <= '0;
      x_q         <= '0;
      y_q         <= '0;
      pix_equal_q <= 1'b0;
      cyc_q       <= '0;
    end else begin
      unique case (state_q)
        ST_IDLE: begin
          if (start) begin
            state_q <= ST_CLEAR;
            clr_q   <= '0;
          end
        end
        ST_CLEAR: begin
          clr_q <= clr_q + CLR_W'(1);
          if (last_clr) begin
            state_q <= ST_RD_IMG;
            pair_q  <= '0;
            cyc_q   <= '0;
          end
        end
        ST_RD_IMG: begin
          cyc_q   <= cyc_q + CYC_W'(1);
          state_q <= ST_RD_HIST;
        end
        ST_RD_HIST: begin
          cyc_q       <= cyc_q + CYC_W'(1);
          x_q         <= img_a_rdata;
          y_q         <= img_b_rdata;
          pix_equal_q <= pix_equal;
          state_q     <= ST_WR_HIST;
        end
        ST_WR_HIST: begin
          cyc_q <= cyc_q + CYC_W'(1);
          if (last_pair) begin
            state_q <= ST_DONE;
          end else begin
            pair_q  <= pair_q + PAIR_W'(1);
            state_q <= ST_RD_IMG;
          end
        end
        ST_DONE: state_q <= ST_IDLE;
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    busy           = (state_q != ST_IDLE) && (state_q != ST_DONE);
    done           = (state_q == ST_DONE);
    compute_cycles = cyc_q;

    // image memory: loader while idle, pixel pair addresses otherwise
    img_a_we    = 1'b0;
    img_a_addr  = {pair_q, 1'b0};
    img_a_wdata = ext_load_data;
    img_b_addr  = {pair_q, 1'b1};
    if (state_q == ST_IDLE) begin
      img_a_we   = ext_load_we;
      img_a_addr = ext_load_addr;
    end

    // histogram memory
    hist_a_we    = 1'b0;
    hist_a_addr  = ext_rd_addr;
    hist_a_wdata = upd_new_x;
    hist_b_we    = 1'b0;
    hist_b_addr  = y_q;
    hist_b_wdata = upd_new_y;
    unique case (state_q)
      ST_CLEAR: begin
        hist_a_we    = 1'b1;
        hist_a_addr  = {clr_q, 1'b0};
        hist_a_wdata = '0;
        hist_b_we    = 1'b1;
        hist_b_addr  = {clr_q, 1'b1};
        hist_b_wdata = '0;
      end
      ST_RD_HIST: begin
        hist_a_addr = img_a_rdata;
        hist_b_addr = img_b_rdata;
      end
      ST_WR_HIST: begin
        hist_a_we   = upd_we_x;
        hist_a_addr = x_q;
        hist_b_we   = upd_we_y;
        hist_b_addr = y_q;
      end
      default: ;
    endcase
  end

  // A start request while a run is in progress is ignored.
  a_start_ignored_when_busy : assert property (@(posedge clk) disable iff (!rst_n)
      (busy && start) |=> (state_q != ST_CLEAR || $past(state_q) == ST_CLEAR));

endmodule
