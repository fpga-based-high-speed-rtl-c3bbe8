// tb_image_bram: checks the dual-ported image memory at its full 16384 x 8 size.
// The whole memory is written through port A with a pseudo-random pattern, then
// read back as even/odd pairs through ports A and B at once. Data must appear one
// clock after the address (block-RAM latency) and match the pattern; a write must
// not change the same cycle's read data (read-first).
module tb_image_bram;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned DEPTH = 16384;
  localparam int unsigned AW    = 14;

  logic             clk = 1'b0;
  logic             a_we;
  logic [AW-1:0]    a_addr, b_addr;
  logic [PIX_W-1:0] a_wdata, a_rdata, b_rdata;
  logic [PIX_W-1:0] ref_mem [DEPTH];
  int unsigned      checks = 0, failures = 0;

  image_bram #(.PIX_W(PIX_W), .DEPTH(DEPTH), .ADDR_W(AW)) dut (
    .clk(clk), .a_we(a_we), .a_addr(a_addr), .a_wdata(a_wdata), .a_rdata(a_rdata),
    .b_addr(b_addr), .b_rdata(b_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 1'b0; a_addr = '0; b_addr = '0; a_wdata = '0;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = PIX_W'($urandom);
    // load
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_we = 1'b1; a_addr = AW'(i); a_wdata = ref_mem[i];
    end
    @(negedge clk);
    a_we = 1'b0;
    // read pairs
    for (int k = 0; k < DEPTH / 2; k++) begin
      a_addr = AW'(2 * k);
      b_addr = AW'(2 * k + 1);
      @(negedge clk);
      checks++;
      if (a_rdata !== ref_mem[2 * k] || b_rdata !== ref_mem[2 * k + 1]) begin
        failures++;
        if (failures < 10)
          $display("FAIL pair %0d: got %0h %0h expected %0h %0h", k, a_rdata, b_rdata,
                   ref_mem[2 * k], ref_mem[2 * k + 1]);
      end
    end
    // read-first: write a new value and see the old one in the same cycle
    a_addr = AW'(100); a_we = 1'b1; a_wdata = ~ref_mem[100]; b_addr = AW'(100);
    @(negedge clk);
    checks++;
    if (a_rdata !== ref_mem[100]) begin
      failures++;
      $display("FAIL read-first: got %0h expected %0h", a_rdata, ref_mem[100]);
    end
    a_we = 1'b0;
    @(negedge clk);
    checks++;
    if (a_rdata !== ~ref_mem[100] || b_rdata !== ~ref_mem[100]) begin
      failures++;
      $display("FAIL after write: got %0h %0h", a_rdata, b_rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
