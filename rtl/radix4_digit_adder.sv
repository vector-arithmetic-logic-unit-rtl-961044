// Radix-4 digit adder: the cell that replaces the single-bit adder when the
// vector ALU works in base 4.
//
// Each operand is one base-4 digit (0..3) held in two bits; with the carry in
// the total ranges 0..7, so the sum digit is the total modulo 4 and the carry
// out is one exactly when the total reaches 4 (at most 3+3+1 = 7, carry 1 and
// digit 3). The cell is built from the digit truth table directly: the low
// bit is the parity of x0, y0 and the carry in, the high bit adds the two
// high bits and the carry from the low position. Combinational.
//
//   x, y : 2-bit digits
//   cin  : carry in
//   s    : sum digit
//   cout : carry out
module radix4_digit_adder (
  input  logic [1:0] x,
  input  logic [1:0] y,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);

  logic c_mid;

  always_comb begin
    s[0]  = x[0] ^ y[0] ^ cin;
    c_mid = (x[0] & y[0]) | (x[0] & cin) | (y[0] & cin);
    s[1]  = x[1] ^ y[1] ^ c_mid;
    cout  = (x[1] & y[1]) | (x[1] & c_mid) | (y[1] & c_mid);
  end

endmodule
