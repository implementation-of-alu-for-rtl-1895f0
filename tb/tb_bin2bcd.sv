// tb_bin2bcd: exhaustive check of the binary to BCD converter over the
// range of a digit product, 0..81: the high nibble must be the tens digit
// and the low nibble the units digit.
module tb_bin2bcd;

  logic [6:0]  p;
  logic [3:0]  b, c;
  int unsigned checks = 0;
  int unsigned failures = 0;

  bin2bcd dut (.p(p), .b(b), .c(c));

  initial begin
    for (int n = 0; n <= 81; n++) begin
      p = 7'(n);
      #1;
      checks++;
      if (int'(b) != n / 10 || int'(c) != n % 10) begin
        failures++;
        $display("FAIL %0d got %0d%0d", n, b, c);
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
