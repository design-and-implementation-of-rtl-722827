// Shared sizes and types of the 5x5 advanced array multiplier.
//
// The multiplier is a fixed 5-bit by 5-bit unsigned design: its column
// structure (which compressor sits in which column) is laid out for exactly
// these widths, so N is a package constant and not a module parameter.
// The operand and product widths follow the published design; the type
// names are this implementation's own.
package aam_pkg;

  // Operand width (multiplicand and multiplier)
  localparam int unsigned N = 5;
  // Product width
  localparam int unsigned P = 2 * N;

  typedef logic [N-1:0] operand_t;
  typedef logic [P-1:0] product_t;

endpackage : aam_pkg
