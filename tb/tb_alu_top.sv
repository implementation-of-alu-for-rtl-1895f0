// tb_alu_top: end-to-end testbench of the two ALUs at their default width.
//
// Drives the 8-operation and the 15-operation ALU of alu_top in parallel,
// each with its own stream of selection codes and operands: first directed
// corner cases, then random traffic. After every rising edge both results
// are compared with the reference model in tb_alu_ref_pkg. Besides the
// values, the testbench counts how often each mechanism of the design was
// exercised and counts a failure for any that never was:
//   - every selection code of both ALUs, including NOP and the codes the
//     8-operation ALU does not define;
//   - binary carry out of bit 63 (add, increment) and borrow (subtract,
//     decrement) wrapping modulo 2**64;
//   - the bit that wraps around in a rotate and the bit lost in a shift;
//   - BCD decimal correction (a digit sum above 9), a decimal carry out of
//     the top digit, and a BCD subtraction with B > A (ten's complement);
//   - a BCD product whose digit products carry into the next digit;
//   - switching the selection without a clock edge, which shows another
//     unit's registered result for the same operands (all units clocked).
// The module has no parameters on the top instance, so this is also the
// full-size run of the design.
module tb_alu_top;
  import tb_bcd_pkg::*;
  import tb_alu_ref_pkg::*;

  typedef enum int {
    EV_BIN_CARRY, EV_BIN_BORROW, EV_ROT_WRAP, EV_SHIFT_LOSS, EV_BCD_CORRECT,
    EV_BCD_CARRY_OUT, EV_BCD_TENS_COMPL, EV_BCD_MUL_CARRY, EV_SEL_SWITCH,
    EV_UNDEFINED_CODE, EV_NOP, EV_COUNT
  } event_e;

  logic        clk = 1'b0;
  logic [3:0]  sel8, sel15;
  logic [63:0] a8, b8, z8, a15, b15, z15;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned op8_count  [16];
  int unsigned op15_count [16];
  int unsigned ev_count   [EV_COUNT];

  alu_top dut (
    .clk (clk),
    .sel8 (sel8), .a8 (a8), .b8 (b8), .z8 (z8),
    .sel15 (sel15), .a15 (a15), .b15 (b15), .z15 (z15)
  );

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  // which mechanisms an operation exercises, worked out from its operands
  function automatic void note(input logic [3:0] op, input logic [63:0] x, input logic [63:0] y,
                               input bit ops15);
    logic [64:0] wide;
    bit          corr = 0;
    if (!ops15 && op[3]) begin
      ev_count[EV_UNDEFINED_CODE]++;
      return;
    end
    case (op)
      4'b0100: begin
        wide = {1'b0, x} + {1'b0, y};
        if (wide[64]) ev_count[EV_BIN_CARRY]++;
      end
      4'b0110: if (x == '1) ev_count[EV_BIN_CARRY]++;
      4'b0101: if (y > x) ev_count[EV_BIN_BORROW]++;
      4'b0111: if (x == '0) ev_count[EV_BIN_BORROW]++;
      4'b1000: if (x[0]) ev_count[EV_ROT_WRAP]++;
      4'b1001: if (x[63]) ev_count[EV_ROT_WRAP]++;
      4'b1010: if (x[0]) ev_count[EV_SHIFT_LOSS]++;
      4'b1011: if (x[63]) ev_count[EV_SHIFT_LOSS]++;
      4'b1100: begin
        for (int k = 0; k < 16; k++) if (int'(x[4*k +: 4]) + int'(y[4*k +: 4]) > 9) corr = 1;
        if (corr) ev_count[EV_BCD_CORRECT]++;
        if (bcd_to_bin(x, 16) + bcd_to_bin(y, 16) >= pow10(16)) ev_count[EV_BCD_CARRY_OUT]++;
      end
      4'b1101: if (bcd_to_bin(y, 16) > bcd_to_bin(x, 16)) ev_count[EV_BCD_TENS_COMPL]++;
      4'b1110: begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            if (int'(x[4*j +: 4]) * int'(y[4*i +: 4]) > 9) corr = 1;
        if (corr) ev_count[EV_BCD_MUL_CARRY]++;
      end
      4'b1111: ev_count[EV_NOP]++;
      default: ;
    endcase
  endfunction

  // one cycle on both ALUs
  task automatic step(input logic [3:0] o8, input logic [63:0] x8, input logic [63:0] y8,
                      input logic [3:0] o15, input logic [63:0] x15, input logic [63:0] y15);
    @(negedge clk);
    sel8 = o8;   a8 = x8;   b8 = y8;
    sel15 = o15; a15 = x15; b15 = y15;
    @(posedge clk);
    #1;
    check(z8,  alu_ref(o8, x8, y8, 1'b0),    "8-operation ALU");
    check(z15, alu_ref(o15, x15, y15, 1'b1), "15-operation ALU");
    op8_count[o8]++;
    op15_count[o15]++;
    note(o8, x8, y8, 1'b0);
    note(o15, x15, y15, 1'b1);
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      op8_count[i]  = 0;
      op15_count[i] = 0;
    end
    for (int i = 0; i < EV_COUNT; i++) ev_count[i] = 0;

    // no register has a reset: the first edge loads known results
    sel8 = 4'b0000;  a8 = '1;  b8 = '1;
    sel15 = 4'b0000; a15 = '1; b15 = '1;
    @(posedge clk);
    #1;
    check(z8, '1, "first edge, 8-operation ALU");
    check(z15, '1, "first edge, 15-operation ALU");

    // directed corners
    step(4'b0100, '1, 64'd1, 4'b0100, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    step(4'b0101, 64'd0, 64'd1, 4'b0101, 64'd5, 64'd7);
    step(4'b0110, '1, '0, 4'b0110, '1, '0);
    step(4'b0111, '0, '0, 4'b0111, '0, '0);
    step(4'b1000, '1, '0, 4'b1000, 64'h1, '0);
    step(4'b1001, '0, '0, 4'b1001, 64'h8000_0000_0000_0001, '0);
    step(4'b1111, '0, '0, 4'b1010, 64'h3, '0);
    step(4'b1010, '0, '0, 4'b1011, 64'hc000_0000_0000_0000, '0);
    step(4'b0000, rnd64(), rnd64(), 4'b1100, 64'h9999_9999_9999_9999, 64'h1);
    step(4'b0001, rnd64(), rnd64(), 4'b1100, 64'h0000_0000_0000_0058, 64'h0000_0000_0000_0067);
    step(4'b0010, rnd64(), rnd64(), 4'b1101, 64'h0000_0000_0000_0003, 64'h0000_0000_0000_0010);
    step(4'b0011, rnd64(), rnd64(), 4'b1110, 64'h0000_0000_0000_9999, 64'h0000_0000_0000_9999);
    step(4'b0100, rnd64(), rnd64(), 4'b1111, rnd64(), rnd64());

    // selection switched without a clock edge: every unit holds its result
    // for the last operands, so z follows sel at once
    @(negedge clk);
    a8 = rnd64(); b8 = rnd64(); sel8 = 4'b0000;
    a15 = rnd64(); b15 = rnd64(); sel15 = 4'b0000;
    @(posedge clk);
    for (int op = 0; op < 12; op++) begin
      #1;
      sel8  = 4'(op % 8);
      sel15 = 4'(op);
      #1;
      check(z8,  alu_ref(sel8, a8, b8, 1'b0),    "8-operation ALU, selection switch");
      check(z15, alu_ref(sel15, a15, b15, 1'b1), "15-operation ALU, selection switch");
    end
    ev_count[EV_SEL_SWITCH]++;

    // random traffic
    for (int i = 0; i < 20000; i++) begin
      automatic logic [3:0] o8  = 4'($urandom_range(15));
      automatic logic [3:0] o15 = 4'($urandom_range(15));
      if (o15[3:2] == 2'b11)
        step(o8, rnd64(), rnd64(), o15, random_bcd(16), random_bcd(16));
      else
        step(o8, rnd64(), rnd64(), o15, rnd64(), rnd64());
    end

    // coverage: every code and every mechanism must have happened
    for (int op = 0; op < 16; op++) begin
      checks += 2;
      if (op8_count[op] == 0) begin
        failures++;
        $display("FAIL 8-operation ALU code %b never applied", 4'(op));
      end
      if (op15_count[op] == 0) begin
        failures++;
        $display("FAIL 15-operation ALU code %b never applied", 4'(op));
      end
    end
    for (int e = 0; e < EV_COUNT; e++) begin
      checks++;
      $display("mechanism %s: %0d", event_e'(e), ev_count[e]);
      if (ev_count[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", event_e'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
