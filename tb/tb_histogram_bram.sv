// tb_histogram_bram: checks the true dual-ported histogram memory (256 x 15).
// Random reads and writes are issued on both ports every cycle, never writing the
// same word through both ports at once; a reference array predicts the read data,
// which must appear one clock after the address with read-first behaviour.
module tb_histogram_bram;
  localparam int unsigned BINS  = 256;
  localparam int unsigned CNT_W = 15;
  localparam int unsigned AW    = 8;

  logic             clk = 1'b0;
  logic             a_we, b_we;
  logic [AW-1:0]    a_addr, b_addr;
  logic [CNT_W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [CNT_W-1:0] ref_mem [BINS];
  logic [CNT_W-1:0] exp_a, exp_b;
  int unsigned      checks = 0, failures = 0;

  histogram_bram #(.BINS(BINS), .CNT_W(CNT_W), .ADDR_W(AW)) dut (
    .clk(clk),
    .a_we(a_we), .a_addr(a_addr), .a_wdata(a_wdata), .a_rdata(a_rdata),
    .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata(b_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 1'b0; b_we = 1'b0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // initialise every word: even bins through A, odd bins through B
    for (int i = 0; i < BINS / 2; i++) begin
      @(negedge clk);
      a_we = 1'b1; a_addr = AW'(2 * i);     a_wdata = CNT_W'(3 * i);
      b_we = 1'b1; b_addr = AW'(2 * i + 1); b_wdata = CNT_W'(7 * i + 1);
      ref_mem[2 * i] = CNT_W'(3 * i);
      ref_mem[2 * i + 1] = CNT_W'(7 * i + 1);
    end
    @(negedge clk);
    a_we = 1'b0; b_we = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      a_addr  = AW'($urandom);
      b_addr  = AW'($urandom);
      a_we    = 1'($urandom);
      b_we    = 1'($urandom) && !(a_we && a_addr == b_addr);
      a_wdata = CNT_W'($urandom);
      b_wdata = CNT_W'($urandom);
      exp_a   = ref_mem[a_addr];
      exp_b   = ref_mem[b_addr];
      @(negedge clk);
      checks++;
      if (a_rdata !== exp_a || b_rdata !== exp_b) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d a[%0d]=%0d exp %0d b[%0d]=%0d exp %0d", n, a_addr, a_rdata, exp_a,
                   b_addr, b_rdata, exp_b);
      end
      if (a_we) ref_mem[a_addr] = a_wdata;
      if (b_we) ref_mem[b_addr] = b_wdata;
    end
    // final sweep through both ports
    a_we = 1'b0; b_we = 1'b0;
    for (int i = 0; i < BINS; i++) begin
      a_addr = AW'(i);
      b_addr = AW'(BINS - 1 - i);
      @(negedge clk);
      checks++;
      if (a_rdata !== ref_mem[i] || b_rdata !== ref_mem[BINS - 1 - i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
