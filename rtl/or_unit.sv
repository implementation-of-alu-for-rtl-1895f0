// or_unit: logical OR unit of the conventional ALUs.
//
// Computes the bitwise OR of the two operands with an array of WIDTH OR
// gates.
// The combinational result is captured in a WIDTH-bit D flip-flop bank on
// every rising edge of clk, as in the design's unit diagrams (logic array
// followed by a D flip-flop, clock always running). Like the design's
// flip-flops, the register has no reset: its content is defined from the
// first rising edge on.
//
// Interface: clk, operand a, operand b, registered result y.
// Timing: y holds the result for the operands present at the previous
// rising edge (one cycle of latency, a new operation every cycle).
module or_unit #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] result;

  always_comb begin
    result = a | b;
  end

  always_ff @(posedge clk) begin
    y <= result;
  end

endmodule
