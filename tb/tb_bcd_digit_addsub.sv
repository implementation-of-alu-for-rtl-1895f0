// tb_bcd_digit_addsub: exhaustive check of the one-digit BCD
// adder/subtractor. For all digits a, b in 0..9, both modes and both carry
// inputs, the digit and carry out must equal the decimal sum
// a + b + c_in (add) or a + (9 - b) + c_in (subtract), split into units
// digit and carry.
module tb_bcd_digit_addsub;

  logic [3:0]  a, b, q;
  logic        sub, c_in, c_out;
  int unsigned checks = 0;
  int unsigned failures = 0;

  bcd_digit_addsub dut (.a(a), .b(b), .sub(sub), .c_in(c_in), .q(q), .c_out(c_out));

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int ci = 0; ci < 2; ci++) begin
        for (int x = 0; x <= 9; x++) begin
          for (int y = 0; y <= 9; y++) begin
            int total;
            a    = 4'(x);
            b    = 4'(y);
            sub  = 1'(m);
            c_in = 1'(ci);
            #1;
            total = x + (m == 1 ? 9 - y : y) + ci;
            checks++;
            if (int'(q) != total % 10 || int'(c_out) != total / 10) begin
              failures++;
              $display("FAIL a=%0d b=%0d sub=%0d cin=%0d got %0d/%0d want %0d/%0d",
                       x, y, m, ci, c_out, q, total / 10, total % 10);
            end
          end
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
