// Single-bit adder cell, the building block of every adder and multiplier in
// the vector ALU.
//
// Sum is the sum of the four minterms with an odd number of ones; the carry
// is the majority of the three inputs. Both are written as two-level logic,
// as the cell is defined. Purely combinational, no clock.
//
//   x, y : operand bits
//   z    : carry in
//   sum  : x ^ y ^ z
//   cout : majority(x, y, z)
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = (!x && !y &&  z) || (!x &&  y && !z) ||
           ( x && !y && !z) || ( x &&  y &&  z);
    cout = (x && y) || (x && z) || (y && z);
  end

endmodule
