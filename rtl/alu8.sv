// alu8: conventional 8-operation ALU.
//
// Eight separate units (AND, XNOR, XOR, OR, adder, subtractor, incrementer,
// decrementer) all receive both operands and the clock on every cycle, and
// each registers its own result. An output multiplexer driven by sel then
// passes the registered result of one unit to z. Because every unit is
// clocked whether or not it is selected, this is the reference (no clock
// gating) organisation. Selection codes follow alu_pkg::alu_op_e, 0000 to
// 0111; codes 1000 to 1111 are not operations of this ALU and give z = 0,
// which is this implementation's choice. As in the design, no register
// has a reset; z is defined from the first rising edge on.
//
// Interface: clk, sel (4 bits), operands a
// and b (WIDTH bits), result z.
// Timing: z = op(a, b) one rising edge after a and b are applied, for the
// operation on sel at the time z is read (sel reaches the output
// multiplexer directly). A new operation can start every cycle.
module alu8
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic                 clk,
  input  logic [SEL_WIDTH-1:0] sel,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic [WIDTH-1:0]     z
);

  localparam int unsigned N_UNITS = 8;

  logic [WIDTH-1:0] unit_y [N_UNITS];

  and_unit         #(.WIDTH(WIDTH)) u_and  (.clk, .a, .b, .y(unit_y[3'(OP_AND)]));
  xnor_unit        #(.WIDTH(WIDTH)) u_xnor (.clk, .a, .b, .y(unit_y[3'(OP_XNOR)]));
  xor_unit         #(.WIDTH(WIDTH)) u_xor  (.clk, .a, .b, .y(unit_y[3'(OP_XOR)]));
  or_unit          #(.WIDTH(WIDTH)) u_or   (.clk, .a, .b, .y(unit_y[3'(OP_OR)]));
  adder_unit       #(.WIDTH(WIDTH)) u_add  (.clk, .a, .b, .y(unit_y[3'(OP_ADD)]));
  subtractor_unit  #(.WIDTH(WIDTH)) u_sub  (.clk, .a, .b, .y(unit_y[3'(OP_SUB)]));
  incrementer_unit #(.WIDTH(WIDTH)) u_inc  (.clk, .a, .b, .y(unit_y[3'(OP_INC)]));
  decrementer_unit #(.WIDTH(WIDTH)) u_dec  (.clk, .a, .b, .y(unit_y[3'(OP_DEC)]));

  always_comb begin
    if (sel < SEL_WIDTH'(N_UNITS)) z = unit_y[sel[2:0]];
    else                           z = '0;
  end

endmodule
