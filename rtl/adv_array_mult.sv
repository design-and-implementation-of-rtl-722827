// Advanced array multiplier: 5-bit x 5-bit unsigned multiplication in which
// each column of partial products is summed by one counter ("compressor").
//
// A conventional array multiplier adds the 25 partial products with a grid
// of 16 full adders and 4 half adders followed by a ripple-carry row. Here
// each product column is instead reduced in a single step by one counter
// that outputs the binary count of the ones it receives:
//
//   col 0 (p0): a0b0, wired straight through
//   col 1 (p1): half adder   over 2 partial products
//   col 2 (p2): 4:3 counter  over k0 + 3 partial products
//   col 3 (p3): 6:3 counter  over k1 + 4 partial products (6th input 0)
//   col 4 (p4): 7:3 counter  over k2, k3 + 5 partial products
//   col 5 (p5): 6:3 counter  over k4, k5 + 4 partial products
//   col 6 (p6): 5:3 counter  over k6, k7 + 3 partial products
//   col 7 (p7): 4:3 counter  over k8, k9 + 2 partial products
//   col 8 (p8): full adder   over k10, k11 + a4b4
//   col 9 (p9): k12 and k13
//
// The weight-1 output of a column's counter is that product bit. Its
// weight-2 output (k1, k3, ... k11) goes to the next column and its weight-4
// output (k2, k4, ... k12) to the column after that; k0 and k13 are the
// carries of the half and full adder. Naming the k signals after the counter
// that drives them, and the choice of counter per column, follow the
// published design. Routing the weight-4 outputs two columns up is what
// makes the counts correct, and is this design's reading; with it column 3
// receives only five bits, so its 6:3 counter has one input tied to 0.
// Column 9 gets k12 and k13. The product never exceeds 31*31 = 961 < 2**10,
// so at most one of them is 1 and p9 is their exclusive-or (this design's
// choice of gate).
//
// There is no separate final carry-propagate adder: every counter output is
// either a product bit or feeds a later column, so the whole array is one
// combinational path from a, b to p, with no clock or handshake.
module adv_array_mult
  import aam_pkg::*;
(
  input  operand_t a,   // multiplicand, unsigned
  input  operand_t b,   // multiplier, unsigned
  output product_t p    // product a*b
);

  // pp[j][i] = a[i] & b[j]
  logic [N-1:0][N-1:0] pp;
  // carries between columns, named after the counter that drives them
  logic [13:0]         k;

  pp_gen #(.N(N)) u_pp_gen (.a(a), .b(b), .pp(pp));

  // col 0
  assign p[0] = pp[0][0];

  // col 1: a1b0, a0b1
  half_adder u_col1 (.x(pp[0][1]), .y(pp[1][0]), .sum(p[1]), .carry(k[0]));

  // col 2: k0, a2b0, a1b1, a0b2
  comp4_3 u_col2 (
    .a(k[0]), .b(pp[0][2]), .c(pp[1][1]), .d(pp[2][0]),
    .z0(p[2]), .z1(k[1]), .z2(k[2])
  );

  // col 3: k1, a3b0, a2b1, a1b2, a0b3
  comp6_3 u_col3 (
    .a(k[1]), .b(pp[0][3]), .c(pp[1][2]), .d(pp[2][1]), .e(pp[3][0]),
    .f(1'b0),
    .z0(p[3]), .z1(k[3]), .z2(k[4])
  );

  // col 4: k2, k3, a4b0, a3b1, a2b2, a1b3, a0b4
  comp7_3 u_col4 (
    .a(k[2]), .b(k[3]), .c(pp[0][4]), .d(pp[1][3]), .e(pp[2][2]),
    .f(pp[3][1]), .g(pp[4][0]),
    .z0(p[4]), .z1(k[5]), .z2(k[6])
  );

  // col 5: k4, k5, a4b1, a3b2, a2b3, a1b4
  comp6_3 u_col5 (
    .a(k[4]), .b(k[5]), .c(pp[1][4]), .d(pp[2][3]), .e(pp[3][2]),
    .f(pp[4][1]),
    .z0(p[5]), .z1(k[7]), .z2(k[8])
  );

  // col 6: k6, k7, a4b2, a3b3, a2b4
  comp5_3 u_col6 (
    .a(k[6]), .b(k[7]), .c(pp[2][4]), .d(pp[3][3]), .e(pp[4][2]),
    .z0(p[6]), .z1(k[9]), .z2(k[10])
  );

  // col 7: k8, k9, a4b3, a3b4
  comp4_3 u_col7 (
    .a(k[8]), .b(k[9]), .c(pp[3][4]), .d(pp[4][3]),
    .z0(p[7]), .z1(k[11]), .z2(k[12])
  );

  // col 8: k10, k11, a4b4
  full_adder u_col8 (.x(k[10]), .y(k[11]), .z(pp[4][4]), .sum(p[8]), .carry(k[13]));

  // col 9: k12 and k13 are never both 1
  assign p[9] = k[12] ^ k[13];

endmodule : adv_array_mult
