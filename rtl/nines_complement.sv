// nines_complement: nine's complement of one BCD digit, s = 9 - x.
//
// The digit is first inverted bit by bit (XOR with 1, giving 15 - x) and a
// 4-bit adder then adds the constant 1010 with carry in 0, so that the sum
// modulo 16 is 15 - x + 10 - 16 = 9 - x. The XOR-then-add structure is the
// design's; the constant 1010 is chosen here because it is the one that
// gives the 0..9 -> 9..0 table the design's BCD adder/subtractor relies on.
// The adder's carry out is not needed and is not brought out.
//
// Interface: x, a BCD digit (0..9); s, its nine's complement. Inputs 10..15
// are not BCD and give no meaningful result.
// Timing: purely combinational.
module nines_complement (
  input  logic [3:0] x,
  output logic [3:0] s
);

  localparam logic [3:0] INVERT = 4'b1111;
  localparam logic [3:0] OFFSET = 4'b1010;

  logic [3:0] inverted;

  always_comb begin
    inverted = x ^ INVERT;
    s        = inverted + OFFSET;
  end

endmodule
