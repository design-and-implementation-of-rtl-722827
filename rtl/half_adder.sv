// Half adder: adds two bits of equal weight.
//
// sum carries the weight of the inputs, carry twice that weight.
// Purely combinational, no clock. Used in the multiplier's second column
// and inside the 4:3, 5:3 and 6:3 compressors.
module half_adder (
  input  logic x,      // addend bit
  input  logic y,      // addend bit
  output logic sum,    // x ^ y
  output logic carry   // x & y
);

  assign sum   = x ^ y;
  assign carry = x & y;

endmodule : half_adder
