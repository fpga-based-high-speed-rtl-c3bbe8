// tb_histogram_update: checks the +1/+1/+2 update unit.
// Random old counts (including values next to the wrap-around point) are applied
// with the equal flag low and high; the expected write enables and counts are
// worked out here from the update rule: different pixels add one to each bin,
// equal pixels add two to the odd pixel's bin and write nothing through port A.
module tb_histogram_update;
  localparam int unsigned CNT_W = 15;

  logic             pix_equal;
  logic [CNT_W-1:0] count_x, count_y, new_x, new_y;
  logic             we_x, we_y;
  int unsigned      checks = 0, failures = 0;

  histogram_update #(.CNT_W(CNT_W)) dut (
    .pix_equal(pix_equal), .count_x(count_x), .count_y(count_y),
    .we_x(we_x), .new_x(new_x), .we_y(we_y), .new_y(new_y)
  );

  task automatic check(input logic eq, input int unsigned cx, input int unsigned cy);
    int unsigned mod = 1 << CNT_W;
    pix_equal = eq;
    count_x   = CNT_W'(cx);
    count_y   = CNT_W'(cy);
    #1;
    checks++;
    if (eq) begin
      if (we_x !== 1'b0 || we_y !== 1'b1 || new_y !== CNT_W'((cy + 2) % mod)) begin
        failures++;
        $display("FAIL eq cx=%0d cy=%0d we_x=%0b we_y=%0b new_y=%0d", cx, cy, we_x, we_y, new_y);
      end
    end else begin
      if (we_x !== 1'b1 || we_y !== 1'b1 || new_x !== CNT_W'((cx + 1) % mod) ||
          new_y !== CNT_W'((cy + 1) % mod)) begin
        failures++;
        $display("FAIL ne cx=%0d cy=%0d new_x=%0d new_y=%0d", cx, cy, new_x, new_y);
      end
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1'b0, 0, 0);
    check(1'b1, 0, 0);
    check(1'b1, 5, 5);
    check(1'b0, (1 << CNT_W) - 1, (1 << CNT_W) - 2);
    check(1'b1, (1 << CNT_W) - 2, (1 << CNT_W) - 2);
    for (int i = 0; i < 2000; i++)
      check(1'($urandom), $urandom % (1 << CNT_W), $urandom % (1 << CNT_W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
