// Full adder: adds three bits of equal weight.
//
// sum carries the weight of the inputs, carry twice that weight, so
// {carry, sum} is the number of ones among x, y and z. Purely combinational.
// It is the building block of the 5:3, 6:3 and 7:3 compressors and adds the
// second-highest column of the multiplier.
module full_adder (
  input  logic x,      // addend bit
  input  logic y,      // addend bit
  input  logic z,      // addend bit (carry in)
  output logic sum,    // x ^ y ^ z
  output logic carry   // majority of x, y, z
);

  assign sum   = x ^ y ^ z;
  assign carry = (x & y) | (x & z) | (y & z);

endmodule : full_adder
