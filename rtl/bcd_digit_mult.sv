// bcd_digit_mult: single BCD digit multiplier with a binary product.
//
// Multiplies two BCD digits x and y (0..9) and gives their product in
// binary on p[6:0] (at most 81, so seven bits suffice). The sixteen
// partial products x[j] & y[i] are formed and added as four shifted rows;
// the design draws the same sum as a small network of half and full adders
// with outputs p0..p6, and the row sum here is this implementation's
// simplest equivalent of it. A binary to BCD converter follows it in the
// BCD multiplier.
//
// Interface: digits x and y; binary product p.
// Timing: purely combinational.
module bcd_digit_mult (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [6:0] p
);

  logic [6:0] row [4];  // partial-product row i, shifted left by i

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      row[i] = 7'({3'b000, x & {4{y[i]}}} << i);
    end
    p = row[0] + row[1] + row[2] + row[3];
  end

endmodule
