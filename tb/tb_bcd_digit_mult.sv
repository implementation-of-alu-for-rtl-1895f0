// tb_bcd_digit_mult: exhaustive check of the single-digit BCD multiplier.
// For all digit pairs 0..9 the binary product must equal x * y.
module tb_bcd_digit_mult;

  logic [3:0]  x, y;
  logic [6:0]  p;
  int unsigned checks = 0;
  int unsigned failures = 0;

  bcd_digit_mult dut (.x(x), .y(y), .p(p));

  initial begin
    for (int i = 0; i <= 9; i++) begin
      for (int j = 0; j <= 9; j++) begin
        x = 4'(i);
        y = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) #10;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
