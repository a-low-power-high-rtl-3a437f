// wallacetree8cma: 8 x 8 unsigned accuracy-controllable multiplier.
//
// Three stages, as in a classic tree multiplier:
//   1. Partial products: eight AND rows (pp_gen).
//   2. Reduction: the rows are first paired, (0,1) (2,3) (4,5) (6,7), and
//      each pair goes through a row of incomplete adder cells, giving an
//      approximate-sum vector P = r0 | r1 and an error-recovery vector
//      Q = r0 & r1 with r0 + r1 = P + Q. The four P vectors and the four Q
//      vectors are each reduced to two by a layer of 4:2 compressors, and a
//      final 4:2 layer reduces those four vectors to a sum vector s_vec and a
//      carry vector c_vec with s_vec + c_vec = a * b (mod 2^16).
//   3. Final addition: a 16-bit carry-maskable adder adds s_vec and c_vec.
//      mask_x[i] (active low) selects, bit by bit, an exact adder cell or an
//      OR cell with the carry passed on unchanged.
// With mask_x all ones the product is exact. With the low m mask bits at zero
// the low m product bits are (s_vec | c_vec) and the result is at most
// 2^m - 1 below the exact product. An immediate assertion checks the exact
// case in simulation.
// The use of iCAC rows, of 4:2 compressors and of the carry-maskable final
// adder follows the published design; the exact wiring of the reduction tree
// (pairing order, one iCAC layer, then three 4:2 rows) is this design's own.
// Purely combinational, no clock.
module wallacetree8cma #(
  parameter int unsigned N = approx_mult_pkg::SUB_W
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2*N-1:0] mask_x,   // active-low mask of the final adder
  output logic [2*N-1:0] product
);

  localparam int unsigned W = 2 * N;

  // The reduction tree below is written for eight rows.
  if (N != 8) begin : g_bad_n
    $error("wallacetree8cma: the reduction tree is built for N = 8");
  end

  logic [W-1:0] rows [N];
  logic [W-1:0] p_vec [4];   // approximate-sum vectors of the iCAC layer
  logic [W-1:0] q_vec [4];   // error-recovery vectors of the iCAC layer
  logic [W-1:0] sp, cp;      // P vectors reduced to two
  logic [W-1:0] sq, cq;      // Q vectors reduced to two
  logic [W-1:0] s_vec, c_vec;
  logic         cout_unused;

  pp_gen #(.N(N)) u_ppg (
    .a    (a),
    .b    (b),
    .rows (rows)
  );

  for (genvar k = 0; k < 4; k++) begin : g_icac
    icac_row #(.N(W)) u_row (
      .a (rows[2*k]),
      .b (rows[2*k+1]),
      .p (p_vec[k]),
      .q (q_vec[k])
    );
  end

  compressor42_row #(.N(W)) u_c42_p (
    .w (p_vec[0]), .x (p_vec[1]), .y (p_vec[2]), .z (p_vec[3]),
    .s (sp), .c (cp)
  );

  compressor42_row #(.N(W)) u_c42_q (
    .w (q_vec[0]), .x (q_vec[1]), .y (q_vec[2]), .z (q_vec[3]),
    .s (sq), .c (cq)
  );

  compressor42_row #(.N(W)) u_c42_f (
    .w (sp), .x (cp), .y (sq), .z (cq),
    .s (s_vec), .c (c_vec)
  );

  // The exact product fits in W bits, so the adder's carry out is not part
  // of it.
  cma #(.K(W)) u_cma (
    .a      (s_vec),
    .b      (c_vec),
    .mask_x (mask_x),
    .sum    (product),
    .cout   (cout_unused)
  );

  // With no cell masked the multiplier is exact.
  always_comb begin
    if (&mask_x) begin
      assert (product == W'(a) * W'(b))
        else $error("wallacetree8cma: inexact product with every mask bit set");
    end
  end

endmodule : wallacetree8cma
