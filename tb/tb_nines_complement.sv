// tb_nines_complement: exhaustive check of the nine's complement of a BCD
// digit. For every digit 0..9 the output must be 9 minus the digit.
module tb_nines_complement;

  logic [3:0]  x;
  logic [3:0]  s;
  int unsigned checks = 0;
  int unsigned failures = 0;

  nines_complement dut (.x(x), .s(s));

  initial begin
    for (int d = 0; d <= 9; d++) begin
      x = 4'(d);
      #1;
      checks++;
      if (int'(s) != 9 - d) begin
        failures++;
        $display("FAIL x=%0d got %0d want %0d", d, s, 9 - d);
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
