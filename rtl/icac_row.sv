// icac_row: a row of N incomplete adder cells.
//
// Applied bit by bit to two N-bit words A and B, the cells give two words
// P = A | B and Q = A & B with A + B = P + Q (no carries are formed; both
// results keep the bit positions of the inputs). P alone is an approximation
// of the sum and Q is the vector that recovers the exact sum. The default
// width of eight follows the eight-bit row of the published design.
// Purely combinational.
module icac_row #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,
  output logic [N-1:0] q
);

  for (genvar i = 0; i < N; i++) begin : g_cell
    icac u_cell (
      .a (a[i]),
      .b (b[i]),
      .p (p[i]),
      .q (q[i])
    );
  end

endmodule : icac_row
