// tb_decrementer_unit: self-checking testbench for the binary decrement unit.
//
// Drives the 64-bit unit with corner operands (all zeros, all ones,
// alternating patterns, single bits) and then random operands, one new pair
// per cycle. The expected value comes from a bit-by-bit reference model in
// this file. Each cycle checks two things: just before the rising edge the
// output still holds the previous result, and just after it the output
// holds the new one, so the one-cycle latency of the unit's register is
// checked as well as its value.
module tb_decrementer_unit;

  localparam int unsigned W = 64;
  localparam int unsigned N_RANDOM = 2000;

  logic         clk = 1'b0;
  logic [W-1:0] a, b;
  logic [W-1:0] y;
  logic [W-1:0] expected;
  int unsigned  checks = 0;
  int unsigned  failures = 0;

  decrementer_unit #(.WIDTH(W)) dut (
    .clk (clk),
    .a   (a),
    .b   (b),
    .y   (y)
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] model(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] r;
    logic         c;
    r = '0;
    c = 1'b0;
    c = 1'b1;  // borrow
    for (int i = 0; i < W; i++) begin
      r[i] = x[i] ^ c;
      c = ~x[i] & c;
    end
    return r;
  endfunction

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h want %h", what, a, b, got, want);
    end
  endtask

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] z);
    @(negedge clk);
    a = x;
    b = z;
    #4 check(y, expected, "holds previous result before the edge");
    @(posedge clk);
    #1;
    expected = model(x, z);
    check(y, expected, "result one edge later");
  endtask

  initial begin
    // the register has no reset: the first edge loads a known result
    a = '0;
    b = '0;
    @(posedge clk);
    #1 expected = model('0, '0);
    check(y, expected, "first edge loads the register");
    apply('0, '0);
    apply('1, '1);
    apply('0, '1);
    apply('1, '0);
    apply({(W/2){2'b10}}, {(W/2){2'b01}});
    apply({(W/2){2'b01}}, {(W/2){2'b10}});
    for (int i = 0; i < W; i++) apply(W'(1) << i, ~(W'(1) << i));
    for (int i = 0; i < int'(N_RANDOM); i++) apply({$urandom, $urandom}, {$urandom, $urandom});
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
