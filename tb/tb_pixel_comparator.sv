// tb_pixel_comparator: exhaustive check of the pixel-pair equality comparator.
// Every pair (a, b) of 8-bit grey levels is applied and a_eq_b is compared with
// the expected flag. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_pixel_comparator;
  localparam int unsigned PIX_W = 8;

  logic [PIX_W-1:0] a, b;
  logic             a_eq_b;
  int unsigned      checks = 0, failures = 0;
  int unsigned      n_eq = 0;

  pixel_comparator #(.PIX_W(PIX_W)) dut (.a(a), .b(b), .a_eq_b(a_eq_b));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** PIX_W; i++) begin
      for (int j = 0; j < 2 ** PIX_W; j++) begin
        logic expect_eq;
        a = PIX_W'(i);
        b = PIX_W'(j);
        #1;
        expect_eq = (i == j);
        checks++;
        if (expect_eq) n_eq++;
        if (a_eq_b !== expect_eq) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d a_eq_b=%0b", i, j, a_eq_b);
        end
      end
    end
    checks++;
    if (n_eq != 2 ** PIX_W) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
