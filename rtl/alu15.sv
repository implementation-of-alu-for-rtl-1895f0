// alu15: conventional 15-operation ALU.
//
// Extends the 8-operation organisation with rotate right, rotate left,
// shift right and shift left by one bit, BCD addition and subtraction and
// BCD multiplication. Every unit receives the operands and the clock on
// every cycle and registers its own result; an output multiplexer driven by
// sel passes one registered result to z. One BCD adder/subtractor unit
// serves both BCD addition (1100) and BCD subtraction (1101); its sub input
// is bit 0 of sel. BCD operands are 16 packed digits; BCD multiplication
// uses the low four digits of each operand and gives an 8-digit product in
// bits 31:0. Selection codes follow alu_pkg::alu_op_e; 1111 is NOP and
// gives z = 0. The NOP output value and the BCD operand layout are this
// implementation's choices. No register has a reset; z is defined from
// the first rising edge on.
//
// Interface: clk, sel (4 bits), operands a
// and b (WIDTH bits), result z.
// Timing: z = op(a, b) one rising edge after a and b are applied, for the
// operation on sel at the time z is read. For BCD addition and
// subtraction, sel must already hold the code at that rising edge, since
// sel[0] chooses add or subtract inside the unit. A new operation can start
// every cycle.
module alu15
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

  localparam int unsigned N_CODES = 16;

  logic [WIDTH-1:0] unit_y [N_CODES];
  logic [WIDTH-1:0] bcd_addsub_y;

  and_unit         #(.WIDTH(WIDTH)) u_and  (.clk, .a, .b, .y(unit_y[OP_AND]));
  xnor_unit        #(.WIDTH(WIDTH)) u_xnor (.clk, .a, .b, .y(unit_y[OP_XNOR]));
  xor_unit         #(.WIDTH(WIDTH)) u_xor  (.clk, .a, .b, .y(unit_y[OP_XOR]));
  or_unit          #(.WIDTH(WIDTH)) u_or   (.clk, .a, .b, .y(unit_y[OP_OR]));
  adder_unit       #(.WIDTH(WIDTH)) u_add  (.clk, .a, .b, .y(unit_y[OP_ADD]));
  subtractor_unit  #(.WIDTH(WIDTH)) u_sub  (.clk, .a, .b, .y(unit_y[OP_SUB]));
  incrementer_unit #(.WIDTH(WIDTH)) u_inc  (.clk, .a, .b, .y(unit_y[OP_INC]));
  decrementer_unit #(.WIDTH(WIDTH)) u_dec  (.clk, .a, .b, .y(unit_y[OP_DEC]));
  rotr_unit        #(.WIDTH(WIDTH)) u_rotr (.clk, .a,     .y(unit_y[OP_ROTR]));
  rotl_unit        #(.WIDTH(WIDTH)) u_rotl (.clk, .a,     .y(unit_y[OP_ROTL]));
  shr_unit         #(.WIDTH(WIDTH)) u_shr  (.clk, .a,     .y(unit_y[OP_SHR]));
  shl_unit         #(.WIDTH(WIDTH)) u_shl  (.clk, .a,     .y(unit_y[OP_SHL]));

  bcd_addsub_unit #(.DIGITS(WIDTH / 4)) u_bcd_addsub (
    .clk, .a, .b,
    .sub (sel[0]),
    .y   (bcd_addsub_y)
  );

  bcd_mult_unit #(.WIDTH(WIDTH)) u_bcd_mul (.clk, .a, .b, .y(unit_y[OP_BCD_MUL]));

  assign unit_y[OP_BCD_ADD] = bcd_addsub_y;
  assign unit_y[OP_BCD_SUB] = bcd_addsub_y;
  assign unit_y[OP_NOP]     = '0;

  assign z = unit_y[sel];

endmodule
