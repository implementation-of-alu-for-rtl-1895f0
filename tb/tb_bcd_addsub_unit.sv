// tb_bcd_addsub_unit: check of the 16-digit BCD adder/subtractor unit.
//
// Applies one operand pair per cycle: corner cases (carry rippling through
// all sixteen digits, 9999...9 + 1, a borrow through all digits, B > A
// giving a ten's complement result) and random 16-digit operands in both
// modes. The expected value is computed through binary integers. Each cycle
// checks that the output still holds the previous result before the rising
// edge and the new result after it (one cycle of latency).
module tb_bcd_addsub_unit;
  import tb_bcd_pkg::*;

  logic        clk = 1'b0;
  logic [63:0] a, b, y, expected;
  logic        sub;
  int unsigned checks = 0;
  int unsigned failures = 0;

  bcd_addsub_unit #(.DIGITS(16)) dut (.clk(clk), .a(a), .b(b), .sub(sub), .y(y));

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] want, input string what);
    checks++;
    if (y !== want) begin
      failures++;
      $display("FAIL %s: a=%h b=%h sub=%0d got %h want %h", what, a, b, sub, y, want);
    end
  endtask

  task automatic apply(input logic [63:0] x, input logic [63:0] z, input logic s);
    longint unsigned m = pow10(16);
    longint unsigned u = bcd_to_bin(x, 16);
    longint unsigned v = bcd_to_bin(z, 16);
    @(negedge clk);
    a   = x;
    b   = z;
    sub = s;
    #4 check(expected, "holds previous result before the edge");
    @(posedge clk);
    #1;
    expected = bin_to_bcd(s ? (u + m - v) % m : (u + v) % m, 16);
    check(expected, "result one edge later");
  endtask

  initial begin
    a = '0;
    b = '0;
    sub = 1'b0;
    @(posedge clk);
    #1 expected = '0;  // 0 + 0, 0 * 0
    check(expected, "first edge loads the register");
    apply(64'h9999_9999_9999_9999, 64'h1, 1'b0);
    apply(64'h1, 64'h9999_9999_9999_9999, 1'b0);
    apply(64'h1234_5678_9012_3456, 64'h8765_4321_0987_6543, 1'b0);
    apply(64'h1000_0000_0000_0000, 64'h1, 1'b1);
    apply(64'h1, 64'h2, 1'b1);
    apply(64'h0, 64'h9999_9999_9999_9999, 1'b1);
    apply(64'h5555, 64'h5555, 1'b1);
    for (int i = 0; i < 3000; i++) apply(random_bcd(16), random_bcd(16), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
