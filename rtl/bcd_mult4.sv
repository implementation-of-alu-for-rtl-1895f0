// bcd_mult4: 4-digit by 4-digit BCD array multiplier.
//
// Every digit y_i of the multiplier is multiplied by every digit x_j of the
// multiplicand with a single-digit multiplier followed by a binary to BCD
// converter, giving a high digit H(i,j) and a low digit L(i,j). L(i,j) has
// weight 10**(i+j) and H(i,j) weight 10**(i+j+1). The digits are laid out
// as eight rows of an 8-digit number (for each i, one row of the four low
// digits and one of the four high digits), and the rows are summed with a
// chain of 8-digit ripple BCD adders into the product P7..P0. The digit
// products and their arrangement by weight are the design's; summing whole
// rows with a chain of adders, instead of the design's diagonal array of
// digit adders, is this implementation's choice. No row sum can exceed
// 9999 * 9999 < 10**8, so no carry leaves the eighth digit.
//
// Interface: BCD operands x and y (4 digits each, digit k in bits 4k+3..4k);
// 8-digit BCD product p.
// Timing: purely combinational.
module bcd_mult4 (
  input  logic [15:0] x,
  input  logic [15:0] y,
  output logic [31:0] p
);

  localparam int unsigned N    = 4;      // digits per operand
  localparam int unsigned ROWS = 2 * N;  // one low and one high row per y digit

  logic [3:0]  hi [N][N];
  logic [3:0]  lo [N][N];
  logic [31:0] rows [ROWS];
  logic [31:0] acc  [ROWS];
  logic [ROWS-1:1] unused_carry;

  for (genvar i = 0; i < N; i++) begin : g_y
    for (genvar j = 0; j < N; j++) begin : g_x
      logic [6:0] bin_prod;
      bcd_digit_mult u_mult (
        .x (x[4*j +: 4]),
        .y (y[4*i +: 4]),
        .p (bin_prod)
      );
      bin2bcd u_conv (
        .p (bin_prod),
        .b (hi[i][j]),
        .c (lo[i][j])
      );
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rows[2*i]   = '0;
      rows[2*i+1] = '0;
      for (int j = 0; j < N; j++) begin
        rows[2*i][4*(i+j) +: 4]     = lo[i][j];
        rows[2*i+1][4*(i+j+1) +: 4] = hi[i][j];
      end
    end
  end

  assign acc[0] = rows[0];

  for (genvar r = 1; r < ROWS; r++) begin : g_sum
    bcd_adder_n #(.DIGITS(8)) u_add (
      .a     (acc[r-1]),
      .b     (rows[r]),
      .sub   (1'b0),
      .c_in  (1'b0),
      .q     (acc[r]),
      .c_out (unused_carry[r])
    );
  end

  assign p = acc[ROWS-1];

endmodule
