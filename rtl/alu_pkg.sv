// alu_pkg: constants and the operation encoding shared by the two ALUs.
//
// The 4-bit selection codes are those of the operation tables of the
// design: codes 0000-0111 are the eight operations of the conventional
// 8-operation ALU, and the 15-operation ALU adds the rotate, shift and BCD
// operations on 1000-1110, with 1111 as NOP. The 64-bit data width is the
// design's own; the encoding names are this implementation's.
package alu_pkg;

  localparam int unsigned ALU_WIDTH = 64;  // operand and result width
  localparam int unsigned SEL_WIDTH = 4;   // width of the selection code

  typedef enum logic [SEL_WIDTH-1:0] {
    OP_AND     = 4'b0000,
    OP_XNOR    = 4'b0001,
    OP_XOR     = 4'b0010,
    OP_OR      = 4'b0011,
    OP_ADD     = 4'b0100,
    OP_SUB     = 4'b0101,
    OP_INC     = 4'b0110,
    OP_DEC     = 4'b0111,
    OP_ROTR    = 4'b1000,
    OP_ROTL    = 4'b1001,
    OP_SHR     = 4'b1010,
    OP_SHL     = 4'b1011,
    OP_BCD_ADD = 4'b1100,
    OP_BCD_SUB = 4'b1101,
    OP_BCD_MUL = 4'b1110,
    OP_NOP     = 4'b1111
  } alu_op_e;

endpackage
