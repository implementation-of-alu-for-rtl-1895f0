// bcd_digit_addsub: one-digit BCD adder/subtractor.
//
// A two-way multiplexer under sub chooses either digit b (sub = 0, ADD) or
// its nine's complement (sub = 1, SUB) as the second operand of a 4-bit
// binary adder with carry in. A BCD correction stage follows: when the
// 5-bit binary sum exceeds 9, 6 is added to the low four bits and the
// decimal carry out is set. Chaining digits through c_in/c_out gives a
// ripple BCD adder; subtraction A - B is obtained as A + (nine's complement
// of B) + 1, the +1 entering as c_in of the lowest digit. The mux, adder and
// correction structure is the design's; the add-6 correction rule is the
// usual one and is this implementation's reading of the correction box.
//
// Interface: digits a and b (0..9), sub, c_in; corrected digit q and
// decimal carry out c_out.
// Timing: purely combinational.
module bcd_digit_addsub (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       sub,
  input  logic       c_in,
  output logic [3:0] q,
  output logic       c_out
);

  localparam logic [4:0] MAX_DIGIT  = 5'd9;
  localparam logic [3:0] CORRECTION = 4'd6;

  logic [3:0] b_comp;   // nine's complement of b
  logic [3:0] b_sel;    // output of the ADD/SUB multiplexer
  logic [4:0] bin_sum;  // binary adder result with its carry

  nines_complement u_nines (
    .x (b),
    .s (b_comp)
  );

  always_comb begin
    b_sel   = sub ? b_comp : b;
    bin_sum = {1'b0, a} + {1'b0, b_sel} + {4'b0, c_in};
    if (bin_sum > MAX_DIGIT) begin
      q     = bin_sum[3:0] + CORRECTION;
      c_out = 1'b1;
    end else begin
      q     = bin_sum[3:0];
      c_out = 1'b0;
    end
  end

endmodule
