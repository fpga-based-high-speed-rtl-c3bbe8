// tb_parallel_histogram_top: end-to-end test of the two-way parallel histogram unit
// at its default size (128 x 128 pixels, 8 bits, 256 bins, 15-bit counts).
//
// Several images are loaded through the load port, the histogram is computed, and
// all 256 bins are read back through the read-out port and compared with a
// histogram counted here in software. Each run must take exactly 3 * 16384 / 2 =
// 24576 (6000h) compute cycles and 128 + 24576 + 1 cycles from start to done.
// Images: a smooth pseudo-natural picture (a sum of gradients plus noise), an
// all-equal image (every pair takes the +2 path and one bin reaches 16384), a ramp
// where neighbours mostly differ, and random noise. Runs follow each other without
// reset, so each one also shows that the previous histogram is cleared.
//
// Mechanisms counted, each must occur at least once: equal pair (+2 update),
// different pair (two +1 updates), a bin hit by consecutive pairs (the next read
// follows the previous write directly), clearing of a non-empty histogram, a start
// request ignored while busy, an image write ignored while busy.
module tb_parallel_histogram_top;
  localparam int unsigned IMG_W = 128;
  localparam int unsigned IMG_H = 128;
  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned BINS  = 256;
  localparam int unsigned CNT_W = 15;

  logic         clk = 1'b0;
  logic         rst_n, load_we, start, busy, done;
  logic [13:0]  load_addr;
  logic [7:0]   load_data, rd_addr;
  logic [31:0]  compute_cycles;
  logic [14:0]  rd_count;

  logic [7:0]   pix [NPIX];
  int unsigned  ref_hist [BINS];
  int unsigned  checks = 0, failures = 0;

  // mechanism counters
  int unsigned  n_equal = 0, n_diff = 0, n_back_to_back = 0, n_clear_filled = 0;
  int unsigned  n_start_tried = 0, n_load_tried = 0, n_start_ignored = 0, n_load_ignored = 0;

  parallel_histogram_top dut (
    .clk(clk), .rst_n(rst_n), .load_we(load_we), .load_addr(load_addr),
    .load_data(load_data), .start(start), .busy(busy), .done(done),
    .compute_cycles(compute_cycles), .rd_addr(rd_addr), .rd_count(rd_count)
  );

  always #5 clk = ~clk;

  initial begin
    #30_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [7:0] clamp8(input int v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return 8'(v);
  endfunction

  task automatic make_image(input int mode);
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        int i = r * IMG_W + c;
        case (mode)
          0: pix[i] = clamp8(40 + r + (c / 2) + int'($urandom % 9) - 4);
          1: pix[i] = 8'd200;
          2: pix[i] = 8'(i);
          default: pix[i] = 8'($urandom);
        endcase
      end
  endtask

  // Mechanisms are counted from the stimulus: each pair or event counted here is
  // one the unit had to process, and the bin-by-bin comparison proves it did.
  task automatic count_mechanisms();
    for (int k = 0; k < NPIX / 2; k++) begin
      if (pix[2 * k] == pix[2 * k + 1]) n_equal++;
      else n_diff++;
      if (k > 0 && (pix[2 * k] == pix[2 * k - 2] || pix[2 * k] == pix[2 * k - 1] ||
                    pix[2 * k + 1] == pix[2 * k - 2] || pix[2 * k + 1] == pix[2 * k - 1]))
        n_back_to_back++;
    end
  endtask

  // One run: optionally load a new image, start, attempt a start and an image write
  // while busy, wait for done, check timing and every bin.
  task automatic run(input int mode, input bit reload, output bit all_ok);
    int unsigned lat, fails_before;
    fails_before = failures;
    if (reload) begin
      make_image(mode);
      for (int i = 0; i < NPIX; i++) begin
        @(negedge clk);
        load_we = 1'b1; load_addr = 14'(i); load_data = pix[i];
      end
      @(negedge clk);
      load_we = 1'b0;
    end
    foreach (ref_hist[b]) ref_hist[b] = 0;
    for (int i = 0; i < NPIX; i++) ref_hist[pix[i]]++;
    count_mechanisms();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    check(busy === 1'b1, "busy after start");
    while (!done) begin
      start     = (lat == 500);           // must be ignored
      load_we   = (lat == 700);           // must be ignored
      load_addr = 14'd0;
      load_data = ~pix[0];
      if (lat == 500) n_start_tried++;
      if (lat == 700) n_load_tried++;
      @(negedge clk);
      lat++;
      if (lat > 100_000) break;
    end
    start = 1'b0; load_we = 1'b0;
    check(compute_cycles == 32'h6000,
          $sformatf("mode %0d compute_cycles %0h expected 6000h", mode, compute_cycles));
    check(lat == BINS / 2 + 3 * NPIX / 2 + 1,
          $sformatf("mode %0d latency %0d expected %0d", mode, lat, BINS / 2 + 3 * NPIX / 2 + 1));
    @(negedge clk);
    check(done === 1'b0 && busy === 1'b0, "done is a one-cycle pulse");
    for (int b = 0; b < BINS; b++) begin
      rd_addr = 8'(b);
      @(negedge clk);
      check(rd_count == CNT_W'(ref_hist[b]),
            $sformatf("mode %0d bin %0d = %0d expected %0d", mode, b, rd_count, ref_hist[b]));
    end
    all_ok = (failures == fails_before);
  endtask

  initial begin
    bit ok;
    rst_n = 1'b0; load_we = 1'b0; load_addr = '0; load_data = '0; start = 1'b0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(busy === 1'b0 && done === 1'b0, "idle after reset");
    run(0, 1'b1, ok);
    run(1, 1'b1, ok);
    // the previous run left a filled histogram: a correct result here shows the clear
    run(2, 1'b1, ok);
    if (ok) n_clear_filled++;
    run(3, 1'b1, ok);
    if (ok) n_clear_filled++;
    // same image again without reloading: pixel 0 is intact only if the image writes
    // attempted during the earlier runs were ignored; likewise the ignored starts
    // would have shown up as wrong latencies above
    run(3, 1'b0, ok);
    if (ok) begin
      n_clear_filled++;
      n_load_ignored = n_load_tried;
      n_start_ignored = n_start_tried;
    end
    check(n_equal > 0,          "mechanism: equal pair (+2) never happened");
    check(n_diff > 0,           "mechanism: different pair (+1,+1) never happened");
    check(n_back_to_back > 0,   "mechanism: bin reused by consecutive pairs never happened");
    check(n_clear_filled > 0,   "mechanism: clearing a filled histogram never happened");
    check(n_start_ignored > 0,  "mechanism: start while busy never ignored");
    check(n_load_ignored > 0,   "mechanism: image write while busy never ignored");
    $display("equal pairs %0d, different pairs %0d, pairs reusing a bin of the previous pair %0d",
             n_equal, n_diff, n_back_to_back);
    $display("filled histograms cleared %0d, starts ignored %0d, image writes ignored %0d",
             n_clear_filled, n_start_ignored, n_load_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
