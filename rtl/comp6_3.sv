// 6:3 compressor (counter): counts the ones among six bits of equal weight.
//
// {z2, z1, z0} is the binary count 0..6 of ones among a..f; z0 has the
// weight of the inputs, z1 twice and z2 four times that weight. The cell
// structure follows the published drawing: a half adder over f and e, a
// full adder over d, c and b, a full adder that adds the two sums and a
// (giving z0), and a full adder over the three weight-2 carries whose sum
// is z1 and whose carry is z2. Which output of each cell feeds which cell
// is worked out from the bit weights. Purely combinational.
module comp6_3 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  input  logic f,
  output logic z0,   // count bit, weight 1
  output logic z1,   // count bit, weight 2
  output logic z2    // count bit, weight 4
);

  logic s_ef, c_ef, s_bcd, c_bcd, c_a;

  half_adder u_ha_ef  (.x(f), .y(e), .sum(s_ef), .carry(c_ef));
  full_adder u_fa_bcd (.x(d), .y(c), .z(b), .sum(s_bcd), .carry(c_bcd));
  full_adder u_fa_a   (.x(s_ef), .y(s_bcd), .z(a), .sum(z0), .carry(c_a));
  full_adder u_fa_out (.x(c_ef), .y(c_bcd), .z(c_a), .sum(z1), .carry(z2));

endmodule : comp6_3
