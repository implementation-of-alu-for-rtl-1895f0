// bcd_mult_unit: BCD multiplier unit of the 15-operation ALU.
//
// Multiplies the low four BCD digits (bits 15:0) of operand a by the low
// four BCD digits of operand b with the 4 x 4 digit array multiplier and
// places the 8-digit BCD product in bits 31:0 of the result, with zeros
// above. The 4 x 4 digit size is the design's; taking the low 16 bits of
// each 64-bit operand is this implementation's choice. The product is
// captured in a D flip-flop bank, without reset, on every rising edge.
//
// Interface: clk, operands a and b (BCD in bits 15:0), registered
// result y. WIDTH must be at least 32.
// Timing: y holds the product of the operands present at the previous
// rising edge (one cycle of latency, a new operation every cycle).
module bcd_mult_unit #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  logic [31:0] product;

  bcd_mult4 u_mult (
    .x (a[15:0]),
    .y (b[15:0]),
    .p (product)
  );

  always_ff @(posedge clk) begin
    y <= WIDTH'(product);
  end

endmodule
