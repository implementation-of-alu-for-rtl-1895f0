// adder_unit: binary addition unit of the conventional ALUs.
//
// Adds the two operands as unsigned binary numbers; the sum wraps modulo
// 2**WIDTH and the carry out is dropped, since the ALU brings out only its
// result word.
// The combinational result is captured in a WIDTH-bit D flip-flop bank on
// every rising edge of clk, as in the design's unit diagrams (logic array
// followed by a D flip-flop, clock always running). Like the design's
// flip-flops, the register has no reset: its content is defined from the
// first rising edge on.
//
// Interface: clk, operand a, operand b, registered result y.
// Timing: y holds the result for the operands present at the previous
// rising edge (one cycle of latency, a new operation every cycle).
module adder_unit #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] result;

  always_comb begin
    result = a + b;
  end

  always_ff @(posedge clk) begin
    y <= result;
  end

endmodule
