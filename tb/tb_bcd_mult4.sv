// tb_bcd_mult4: check of the 4 x 4 digit BCD array multiplier. Corner
// operands (0, 1, 9999 and single nines) and random 4-digit operands are
// multiplied; the 8-digit BCD product must equal the integer product,
// computed by converting the operands to binary.
module tb_bcd_mult4;
  import tb_bcd_pkg::*;

  logic [15:0] x, y;
  logic [31:0] p;
  int unsigned checks = 0;
  int unsigned failures = 0;

  bcd_mult4 dut (.x(x), .y(y), .p(p));

  task automatic try(input logic [15:0] u, input logic [15:0] v);
    logic [63:0] want;
    x = u;
    y = v;
    #1;
    want = bin_to_bcd(bcd_to_bin(64'(u), 4) * bcd_to_bin(64'(v), 4), 8);
    checks++;
    if (p !== want[31:0]) begin
      failures++;
      $display("FAIL %h * %h got %h want %h", u, v, p, want[31:0]);
    end
  endtask

  initial begin
    try(16'h0000, 16'h9999);
    try(16'h0001, 16'h0001);
    try(16'h9999, 16'h9999);
    try(16'h9000, 16'h0009);
    try(16'h0009, 16'h9000);
    try(16'h1234, 16'h5678);
    for (int i = 0; i < 3000; i++) try(random_bcd(4)[15:0], random_bcd(4)[15:0]);
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
