// pp_gen: partial product generation of an N x N unsigned multiplier.
//
// Row j is the multiplicand ANDed with multiplier bit j and shifted left by
// j places, so that the product is the sum of the N rows (the dot diagram of
// the textbook multiplication scheme, bit a[i]b[j] in column i + j). Rows
// are 2N bits wide with zeros outside the shifted multiplicand. Purely
// combinational, N*N AND gates.
module pp_gen #(
  parameter int unsigned N = approx_mult_pkg::SUB_W
) (
  input  logic [N-1:0]   a,        // multiplicand
  input  logic [N-1:0]   b,        // multiplier
  output logic [2*N-1:0] rows [N]  // rows[j] = (a & {N{b[j]}}) << j
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      rows[j] = (2*N)'(a & {N{b[j]}}) << j;
    end
  end

endmodule : pp_gen
