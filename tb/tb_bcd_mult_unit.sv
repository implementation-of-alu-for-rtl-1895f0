// tb_bcd_mult_unit: check of the BCD multiplier unit of the 15-operation
// ALU. The low four digits of each operand are random BCD and the upper
// 48 bits random binary, which the unit must ignore. The expected product
// (8 digits in bits 31:0, zeros above) is computed through binary integers.
// Each cycle checks the previous result before the rising edge and the new
// one after it (one cycle of latency).
module tb_bcd_mult_unit;
  import tb_bcd_pkg::*;

  logic        clk = 1'b0;
  logic [63:0] a, b, y, expected;
  int unsigned checks = 0;
  int unsigned failures = 0;

  bcd_mult_unit #(.WIDTH(64)) dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] want, input string what);
    checks++;
    if (y !== want) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h want %h", what, a, b, y, want);
    end
  endtask

  task automatic apply(input logic [63:0] x, input logic [63:0] z);
    @(negedge clk);
    a = x;
    b = z;
    #4 check(expected, "holds previous result before the edge");
    @(posedge clk);
    #1;
    expected = bin_to_bcd(bcd_to_bin(x, 4) * bcd_to_bin(z, 4), 8);
    check(expected, "result one edge later");
  endtask

  initial begin
    a = '0;
    b = '0;
    @(posedge clk);
    #1 expected = '0;  // 0 + 0, 0 * 0
    check(expected, "first edge loads the register");
    apply(64'h9999, 64'h9999);
    apply(64'hffff_ffff_ffff_0007, 64'habcd_ef01_2345_0008);
    apply(64'h0, 64'h1234);
    for (int i = 0; i < 2000; i++)
      apply({$urandom, $urandom_range(65535), random_bcd(4)[15:0]},
            {$urandom, $urandom_range(65535), random_bcd(4)[15:0]});
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
