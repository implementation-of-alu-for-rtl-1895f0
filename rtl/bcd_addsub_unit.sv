// bcd_addsub_unit: BCD adder/subtractor unit of the 15-operation ALU.
//
// Treats each operand as DIGITS packed BCD digits (16 digits fill the
// 64-bit operands) and adds (sub = 0) or subtracts (sub = 1) them with a
// ripple of one-digit BCD adder/subtractors. Addition drops the final
// decimal carry, so the result is a + b modulo 10**DIGITS; subtraction
// feeds a carry of 1 into the lowest digit and adds the nine's complement
// of b, giving a - b modulo 10**DIGITS (ten's complement when b > a). The
// digit adder is the design's; the digit count, the carry-in choice for
// subtraction and the dropped final carry are this implementation's.
// The result is captured in a D flip-flop bank, without reset, on every
// rising edge.
//
// Interface: clk, BCD operands a and b, sub, registered result y.
// Timing: y holds the result for the inputs present at the previous rising
// edge (one cycle of latency, a new operation every cycle).
module bcd_addsub_unit #(
  parameter int unsigned DIGITS = alu_pkg::ALU_WIDTH / 4
) (
  input  logic                clk,
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                sub,
  output logic [4*DIGITS-1:0] y
);

  logic [4*DIGITS-1:0] result;
  logic                carry_out;  // decimal carry / no-borrow, not brought out

  bcd_adder_n #(.DIGITS(DIGITS)) u_adder (
    .a     (a),
    .b     (b),
    .sub   (sub),
    .c_in  (sub),
    .q     (result),
    .c_out (carry_out)
  );

  always_ff @(posedge clk) begin
    y <= result;
  end

endmodule
