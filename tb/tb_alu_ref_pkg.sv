// tb_alu_ref_pkg: reference model of the two ALUs for the testbenches.
//
// alu_ref(op, a, b, ops15) returns the result word the ALU must show for
// selection code op and 64-bit operands a and b. With ops15 = 0 it models
// the 8-operation ALU (codes 1000-1111 give 0); with ops15 = 1 the
// 15-operation ALU. Binary arithmetic uses SystemVerilog operators and BCD
// arithmetic goes through binary integers, so the model shares no
// structure with the hardware.
package tb_alu_ref_pkg;
  import tb_bcd_pkg::*;

  function automatic logic [63:0] alu_ref(input logic [3:0] op, input logic [63:0] a,
                                         input logic [63:0] b, input bit ops15);
    longint unsigned m = pow10(16);
    longint unsigned x = bcd_to_bin(a, 16);
    longint unsigned y = bcd_to_bin(b, 16);
    if (!ops15 && op[3]) return '0;
    case (op)
      4'b0000: return a & b;
      4'b0001: return ~(a ^ b);
      4'b0010: return a ^ b;
      4'b0011: return a | b;
      4'b0100: return a + b;
      4'b0101: return a - b;
      4'b0110: return a + 64'd1;
      4'b0111: return a - 64'd1;
      4'b1000: return (a >> 1) | (a << 63);
      4'b1001: return (a << 1) | (a >> 63);
      4'b1010: return a >> 1;
      4'b1011: return a << 1;
      4'b1100: return bin_to_bcd((x + y) % m, 16);
      4'b1101: return bin_to_bcd((x + m - y) % m, 16);
      4'b1110: return bin_to_bcd(bcd_to_bin(a, 4) * bcd_to_bin(b, 4), 8);
      default: return '0;
    endcase
  endfunction

endpackage
