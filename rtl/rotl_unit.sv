// rotl_unit: rotate left unit of the 15-operation ALU.
//
// Rotates operand a left by one bit: output bit i takes input bit i-1, and
// output bit 0 takes input bit WIDTH-1.
// Bit WIDTH-1 is the most significant bit and "right" is towards bit 0.
// The unit is pure wiring from each input bit to the neighbouring output
// flip-flop: a WIDTH-bit D flip-flop bank, clocked on every rising edge,
// holds the moved word; as in the design it has no reset. The
// one-position move is the design's.
//
// Interface: clk, operand a, registered result y.
// Timing: y holds the result for the operand present at the previous
// rising edge (one cycle of latency, a new operation every cycle).
module rotl_unit #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] result;

  always_comb begin
    result = {a[WIDTH-2:0], a[WIDTH-1]};
  end

  always_ff @(posedge clk) begin
    y <= result;
  end

endmodule
