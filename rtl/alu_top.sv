// alu_top: the two conventional ALUs side by side.
//
// Holds the 8-operation ALU and the 15-operation ALU as two independent
// datapaths with their own selection, operand and result ports; only the
// clock is shared. Neither ALU gates its clock:
// every unit of both is clocked on every cycle.
//
// Interface: clk; sel8/a8/b8 -> z8 for the 8-operation ALU and
// sel15/a15/b15 -> z15 for the 15-operation ALU, with the selection codes
// of alu_pkg::alu_op_e.
// Timing: each result is registered inside its unit and appears one rising
// edge after its operands; see alu8 and alu15.
module alu_top
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic                 clk,
  input  logic [SEL_WIDTH-1:0] sel8,
  input  logic [WIDTH-1:0]     a8,
  input  logic [WIDTH-1:0]     b8,
  output logic [WIDTH-1:0]     z8,
  input  logic [SEL_WIDTH-1:0] sel15,
  input  logic [WIDTH-1:0]     a15,
  input  logic [WIDTH-1:0]     b15,
  output logic [WIDTH-1:0]     z15
);

  alu8 #(.WIDTH(WIDTH)) u_alu8 (
    .clk,
    .sel (sel8),
    .a   (a8),
    .b   (b8),
    .z   (z8)
  );

  alu15 #(.WIDTH(WIDTH)) u_alu15 (
    .clk,
    .sel (sel15),
    .a   (a15),
    .b   (b15),
    .z   (z15)
  );

endmodule
