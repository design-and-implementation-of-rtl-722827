// 5:3 compressor (counter): counts the ones among five bits of equal weight.
//
// {z2, z1, z0} is the binary count 0..5 of ones among a..e; z0 has the
// weight of the inputs, z1 twice and z2 four times that weight. The
// published design names this compressor and uses it in one column of the
// multiplier but does not draw it; its counting function is taken to be the
// same as that of the other compressors. The structure is this design's own:
// a full adder over c, d, e, a second full adder folding that sum with a and
// b (giving z0), and a half adder over the two weight-2 carries (giving z1
// and z2). Purely combinational.
module comp5_3 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic z0,   // count bit, weight 1
  output logic z1,   // count bit, weight 2
  output logic z2    // count bit, weight 4
);

  logic s_cde, c_cde, c_ab;

  full_adder u_fa_cde (.x(c), .y(d), .z(e), .sum(s_cde), .carry(c_cde));
  full_adder u_fa_ab  (.x(s_cde), .y(a), .z(b), .sum(z0), .carry(c_ab));
  half_adder u_ha_out (.x(c_cde), .y(c_ab), .sum(z1), .carry(z2));

endmodule : comp5_3
