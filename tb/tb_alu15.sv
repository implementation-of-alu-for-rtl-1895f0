// tb_alu15: self-checking testbench for the 15-operation ALU.
//
// Every cycle a random selection code and a random operand pair are applied
// at the falling clock edge; for the BCD codes the operands are random
// packed BCD. Two checks per cycle: just before the rising edge, z must
// show the newly selected unit's result for the previous operands (the
// selection reaches the output multiplexer directly, the units' registers
// still hold the old results), and just after it z must show the result for
// the new operands, computed by the reference model in tb_alu_ref_pkg.
// Every selection code, defined or not, is exercised.
module tb_alu15;
  import tb_bcd_pkg::*;
  import tb_alu_ref_pkg::*;

  localparam bit OPS15 = 1'b1;

  logic        clk = 1'b0;
  logic [3:0]  sel;
  logic [63:0] a, b, z;
  logic [63:0] prev_a, prev_b;
  logic        prev_sub;  // sel[0] at the previous rising edge
  logic        prev_bcd;  // previous operands were packed BCD
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned per_op [16];

  alu15 #(.WIDTH(64)) dut (.clk(clk), .sel(sel), .a(a), .b(b), .z(z));

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] want, input string what);
    checks++;
    if (z !== want) begin
      failures++;
      $display("FAIL %s: sel=%b a=%h b=%h got %h want %h", what, sel, a, b, z, want);
    end
  endtask

  task automatic apply(input logic [3:0] op, input logic [63:0] x, input logic [63:0] y);
    logic [3:0] before_op;
    @(negedge clk);
    sel = op;
    a   = x;
    b   = y;
    // the BCD adder/subtractor registered its result under the old sel[0]
    before_op = (OPS15 && op[3:1] == 3'b110) ? {3'b110, prev_sub} : op;
    // a BCD unit fed with non-BCD operands holds no modelled value
    #4 if (!(OPS15 && op[3:2] == 2'b11 && !prev_bcd))
      check(alu_ref(before_op, prev_a, prev_b, OPS15), "before the edge");
    @(posedge clk);
    #1 check(alu_ref(op, x, y, OPS15), "one edge later");
    prev_a   = x;
    prev_b   = y;
    prev_sub = op[0];
    prev_bcd = OPS15 && op[3:2] == 2'b11;
    per_op[op]++;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) per_op[i] = 0;
    // no register has a reset: the first edge loads every unit with its
    // result for 0 op 0 (the BCD unit adding, as sel[0] = 0)
    sel = 4'b0000;
    a = '0;
    b = '0;
    @(posedge clk);
    #1 check(alu_ref(sel, a, b, OPS15), "first edge loads the units");
    prev_a = '0;
    prev_b = '0;
    prev_sub = 1'b0;
    prev_bcd = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      automatic logic [3:0] op = 4'($urandom_range(16 - 1));
      if (op[3:2] == 2'b11 && OPS15)
        apply(op, random_bcd(16), random_bcd(16));
      else
        apply(op, {$urandom, $urandom}, {$urandom, $urandom});
    end
    for (int op = 0; op < 16; op++) begin
      checks++;
      if (per_op[op] == 0) begin
        failures++;
        $display("FAIL selection code %b never exercised", 4'(op));
      end
    end
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
