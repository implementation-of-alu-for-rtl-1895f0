// bin2bcd: binary to BCD converter for one digit product.
//
// Converts the 7-bit binary product of two BCD digits (0..81) into two BCD
// digits: b, the higher nibble (tens), and c, the lower nibble (units). The
// tens digit is the quotient of a division by the constant 10 and the units
// digit the remainder; synthesis reduces both to a small gate network, as
// the design draws it. The split into a high and a low nibble is the
// design's; the division form is this implementation's.
//
// Interface: binary p; BCD digits b (tens) and c (units). Inputs above 81
// do not come from a digit product; for them b may exceed 9.
// Timing: purely combinational.
module bin2bcd (
  input  logic [6:0] p,
  output logic [3:0] b,
  output logic [3:0] c
);

  localparam logic [6:0] TEN = 7'd10;

  logic [6:0] tens;

  always_comb begin
    tens = p / TEN;
    b    = tens[3:0];
    c    = 4'(p - tens * TEN);
  end

endmodule
