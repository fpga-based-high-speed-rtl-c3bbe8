// tb_histogram_controller: checks the sequencer on its own, with the memories, the
// comparator and the increment unit modelled in the testbench.
// The models are one-cycle-latency arrays and the update rule written out here. A
// small configuration (64 pixels of 4 bits, 16 bins) makes equal pairs and repeated
// bins frequent. Each run starts from a histogram memory filled with garbage, so
// the clear phase is checked too. Checked: final counts against a software
// histogram, compute_cycles = 3 * NPIX / 2, the total start-to-done latency
// (BINS/2 clear cycles + compute cycles + 1), busy/done behaviour, that start
// is ignored while busy, that loads are ignored while busy, and that the two
// histogram ports never write the same bin in one cycle.
module tb_histogram_controller;
  localparam int unsigned PIX_W  = 4;
  localparam int unsigned NPIX   = 64;
  localparam int unsigned CNT_W  = 7;
  localparam int unsigned IMG_AW = 6;
  localparam int unsigned BINS   = 16;
  localparam int unsigned CYC_W  = 32;

  logic              clk = 1'b0;
  logic              rst_n, start, busy, done;
  logic [CYC_W-1:0]  compute_cycles;
  logic              ext_load_we;
  logic [IMG_AW-1:0] ext_load_addr;
  logic [PIX_W-1:0]  ext_load_data, ext_rd_addr;
  logic              img_a_we;
  logic [IMG_AW-1:0] img_a_addr, img_b_addr;
  logic [PIX_W-1:0]  img_a_wdata, img_a_rdata, img_b_rdata;
  logic              pix_equal, pix_equal_q;
  logic              upd_we_x, upd_we_y;
  logic [CNT_W-1:0]  upd_new_x, upd_new_y;
  logic              hist_a_we, hist_b_we;
  logic [PIX_W-1:0]  hist_a_addr, hist_b_addr;
  logic [CNT_W-1:0]  hist_a_wdata, hist_b_wdata, hist_a_rdata, hist_b_rdata;

  logic [PIX_W-1:0]  img_mem  [NPIX];
  logic [CNT_W-1:0]  hist_mem [BINS];
  int unsigned       ref_hist [BINS];
  int unsigned       checks = 0, failures = 0;
  int unsigned       n_equal_pairs = 0, n_collide = 0;

  histogram_controller #(
    .PIX_W(PIX_W), .NPIX(NPIX), .CNT_W(CNT_W), .IMG_AW(IMG_AW), .BINS(BINS), .CYC_W(CYC_W)
  ) dut (.*);

  always #5 clk = ~clk;

  // memory models (one cycle read latency, read-first)
  always_ff @(posedge clk) begin
    if (img_a_we) img_mem[img_a_addr] <= img_a_wdata;
    img_a_rdata <= img_mem[img_a_addr];
    img_b_rdata <= img_mem[img_b_addr];
    if (hist_a_we) hist_mem[hist_a_addr] <= hist_a_wdata;
    if (hist_b_we) hist_mem[hist_b_addr] <= hist_b_wdata;
    hist_a_rdata <= hist_mem[hist_a_addr];
    hist_b_rdata <= hist_mem[hist_b_addr];
    if (hist_a_we && hist_b_we && hist_a_addr == hist_b_addr) n_collide++;
  end

  // comparator and update models
  always_comb begin
    pix_equal = (img_a_rdata == img_b_rdata);
    upd_we_x  = !pix_equal_q;
    upd_new_x = hist_a_rdata + CNT_W'(1);
    upd_we_y  = 1'b1;
    upd_new_y = hist_b_rdata + (pix_equal_q ? CNT_W'(2) : CNT_W'(1));
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_image(input int mode);
    int unsigned lat;
    logic [PIX_W-1:0] pix [NPIX];
    for (int i = 0; i < NPIX; i++) begin
      case (mode)
        0: pix[i] = PIX_W'($urandom);
        1: pix[i] = PIX_W'(5);
        2: pix[i] = PIX_W'(i / 2);
        default: pix[i] = PIX_W'($urandom % 3);
      endcase
    end
    foreach (ref_hist[b]) ref_hist[b] = 0;
    for (int i = 0; i < NPIX; i++) ref_hist[pix[i]]++;
    for (int k = 0; k < NPIX / 2; k++) if (pix[2 * k] == pix[2 * k + 1]) n_equal_pairs++;
    // load through the controller while idle
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      ext_load_we = 1'b1; ext_load_addr = IMG_AW'(i); ext_load_data = pix[i];
    end
    @(negedge clk);
    ext_load_we = 1'b0;
    // garbage in the histogram memory: the run must clear it
    foreach (hist_mem[b]) hist_mem[b] = CNT_W'($urandom);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    check(busy === 1'b1, "busy after start");
    while (!done) begin
      // start and load attempts while busy must have no effect
      if (lat == 20) begin
        start = 1'b1;
        ext_load_we = 1'b1; ext_load_addr = '0; ext_load_data = ~pix[0];
      end else begin
        start = 1'b0;
        ext_load_we = 1'b0;
      end
      @(negedge clk);
      lat++;
    end
    start = 1'b0; ext_load_we = 1'b0;
    check(busy === 1'b0, "busy low at done");
    check(compute_cycles == CYC_W'(3 * NPIX / 2),
          $sformatf("compute_cycles %0d expected %0d", compute_cycles, 3 * NPIX / 2));
    check(lat == BINS / 2 + 3 * NPIX / 2 + 1,
          $sformatf("latency %0d expected %0d", lat, BINS / 2 + 3 * NPIX / 2 + 1));
    check(img_mem[0] == pix[0], "image written while busy");
    for (int b = 0; b < BINS; b++)
      check(hist_mem[b] == CNT_W'(ref_hist[b]),
            $sformatf("mode %0d bin %0d = %0d expected %0d", mode, b, hist_mem[b], ref_hist[b]));
    // read-out port while idle
    for (int b = 0; b < BINS; b++) begin
      ext_rd_addr = PIX_W'(b);
      @(negedge clk);
      check(hist_a_rdata == CNT_W'(ref_hist[b]), $sformatf("read-out bin %0d", b));
    end
    @(negedge clk);
    check(done === 1'b0 && busy === 1'b0, "done is a single pulse");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; ext_load_we = 1'b0; ext_load_addr = '0; ext_load_data = '0;
    ext_rd_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(busy === 1'b0 && done === 1'b0, "idle after reset");
    run_image(0);
    run_image(1);
    run_image(2);
    run_image(3);
    check(n_equal_pairs > 0, "equal pairs occurred");
    check(n_collide == 0, "no same-bin double write");
    $display("equal pairs seen: %0d", n_equal_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
