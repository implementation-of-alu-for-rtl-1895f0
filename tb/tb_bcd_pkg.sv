// tb_bcd_pkg: reference arithmetic for the BCD testbenches.
//
// Converts between packed BCD words (digit k in bits 4k+3..4k) and binary
// integers, so that the testbenches can compute expected BCD results with
// ordinary integer arithmetic, independently of the BCD hardware.
package tb_bcd_pkg;

  // packed BCD (up to 16 digits) to binary
  function automatic longint unsigned bcd_to_bin(input logic [63:0] v, input int digits);
    longint unsigned r = 0;
    for (int k = digits - 1; k >= 0; k--) r = r * 10 + longint'(v[4*k +: 4]);
    return r;
  endfunction

  // binary to packed BCD (up to 16 digits); higher digits are dropped
  function automatic logic [63:0] bin_to_bcd(input longint unsigned n, input int digits);
    logic [63:0] r = '0;
    for (int k = 0; k < digits; k++) begin
      r[4*k +: 4] = 4'(n % 10);
      n = n / 10;
    end
    return r;
  endfunction

  // random packed BCD word of the given number of digits
  function automatic logic [63:0] random_bcd(input int digits);
    logic [63:0] r = '0;
    for (int k = 0; k < digits; k++) r[4*k +: 4] = 4'($urandom_range(9));
    return r;
  endfunction

  // 10**n as a 64-bit integer (n <= 19)
  function automatic longint unsigned pow10(input int n);
    longint unsigned r = 1;
    for (int k = 0; k < n; k++) r = r * 10;
    return r;
  endfunction

endpackage
