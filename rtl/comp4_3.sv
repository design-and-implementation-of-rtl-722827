// 4:3 compressor (counter): counts the ones among four bits of equal weight.
//
// {z2, z1, z0} is the binary count 0..4 of ones among a, b, c and d; z0 has
// the weight of the inputs, z1 twice and z2 four times that weight. The
// counting function is the published one. The gate-level structure is this
// design's own choice, as the smallest one built from the same cells as the
// larger compressors: a full adder over b, c, d, a half adder folding its
// sum with a (giving z0), and a half adder over the two weight-2 carries
// (giving z1 and z2). Purely combinational.
module comp4_3 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z0,   // count bit, weight 1
  output logic z1,   // count bit, weight 2
  output logic z2    // count bit, weight 4
);

  logic s_bcd, c_bcd, c_a;

  full_adder u_fa_bcd (.x(b), .y(c), .z(d), .sum(s_bcd), .carry(c_bcd));
  half_adder u_ha_a   (.x(s_bcd), .y(a), .sum(z0), .carry(c_a));
  half_adder u_ha_out (.x(c_bcd), .y(c_a), .sum(z1), .carry(z2));

endmodule : comp4_3
