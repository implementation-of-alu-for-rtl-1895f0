// bcd_adder_n: DIGITS-digit ripple BCD adder/subtractor.
//
// Chains DIGITS one-digit BCD adder/subtractors through their decimal carry.
// With sub = 0 it adds a + b + c_in; with sub = 1 every digit of b is
// replaced by its nine's complement, so that with c_in = 1 the result is
// a - b modulo 10**DIGITS (ten's complement when b > a) and c_out = 1 means
// a >= b. Digit k occupies bits 4k+3..4k.
//
// Interface: BCD words a and b, sub, c_in; BCD word q and final carry c_out.
// Timing: purely combinational; the carry ripples through all digits.
module bcd_adder_n #(
  parameter int unsigned DIGITS = 16
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                sub,
  input  logic                c_in,
  output logic [4*DIGITS-1:0] q,
  output logic                c_out
);

  logic [DIGITS:0] carry;

  assign carry[0] = c_in;
  assign c_out    = carry[DIGITS];

  for (genvar k = 0; k < DIGITS; k++) begin : g_digit
    bcd_digit_addsub u_digit (
      .a     (a[4*k +: 4]),
      .b     (b[4*k +: 4]),
      .sub   (sub),
      .c_in  (carry[k]),
      .q     (q[4*k +: 4]),
      .c_out (carry[k+1])
    );
  end

endmodule
