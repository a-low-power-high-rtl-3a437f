// approx_mult_pkg: sizes shared by the accuracy-controllable multiplier.
//
// The multiplier is 16 x 16 bits, assembled from four 8 x 8 sub-multipliers
// whose 16-bit products are merged by 16-bit carry-maskable adders. These
// three numbers are the defaults of every module's parameters.
package approx_mult_pkg;

  // Operand width of the full multiplier.
  localparam int unsigned MUL_W = 16;
  // Operand width of one sub-multiplier (MUL_W / 2).
  localparam int unsigned SUB_W = 8;
  // Width of a sub-product and of the carry-maskable adders that merge them.
  localparam int unsigned CMA_W = 2 * SUB_W;

endpackage : approx_mult_pkg
