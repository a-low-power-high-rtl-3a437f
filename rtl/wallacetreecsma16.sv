// wallacetreecsma16: 16 x 16 unsigned accuracy-controllable approximate
// multiplier (top level).
//
// The operands are split into bytes, a = {ah, al} and b = {bh, bl}, and four
// 8 x 8 accuracy-controllable multipliers form
//   p = al*bl (u1), q = ah*bl (u2), r = al*bh (u3), s = ah*bh (u4).
// Three 16-bit carry-maskable adders then merge them:
//   add21cma: x = q + r                          carry out c1 (weight 2^24)
//   add22cma: y = x + p[15:8]                    carry out c2 (weight 2^24)
//   add23cma: z = s + {c1 + c2, y[15:8]}         carry out c3 (weight 2^32)
// and product = {z, y[7:0], p[7:0]}. With every mask bit at one this is
// a * b exactly and c3 is 0.
//
// Accuracy control: mask_x[i] is the active-low mask of every adder cell
// that produces product weight 2^i, in the sub-multipliers' final adders as
// well as in the three merging adders (u1 uses mask_x[15:0], u2/u3 and
// add21cma/add22cma use mask_x[23:8], u4 and add23cma use mask_x[31:16]).
// Clearing the low m bits turns those columns into OR gates and shortens
// every carry chain; it can be changed from one operation to the next.
//
// The four sub-multipliers, the three adder instances and the names p, q, r,
// s, x, y, z, c1, c2, c3 follow the published design. Which partial product
// each adder takes, the carry handling into add23cma and the single per-weight
// mask vector are this design's reading. Purely combinational, no clock;
// the critical path is one 8 x 8 multiplier plus three 16-bit adders.
module wallacetreecsma16 #(
  parameter int unsigned N = approx_mult_pkg::MUL_W
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2*N-1:0] mask_x,   // active low, one bit per product weight
  output logic [2*N-1:0] product
);

  localparam int unsigned H = N / 2;   // sub-multiplier operand width
  localparam int unsigned W = N;       // sub-product and adder width

  // The byte-wise decomposition below is written for N = 16.
  if (N != 16) begin : g_bad_n
    $error("wallacetreecsma16: the decomposition is built for N = 16");
  end

  logic [H-1:0] al, ah, bl, bh;
  logic [W-1:0] p, q, r, s;
  logic [W-1:0] x, y, z;
  logic         c1, c2, c3;
  logic [W-1:0] y_hi_ext, p_hi_ext;

  always_comb begin
    al = a[H-1:0];
    ah = a[N-1:H];
    bl = b[H-1:0];
    bh = b[N-1:H];
  end

  wallacetree8cma #(.N(H)) u1 (
    .a (al), .b (bl), .mask_x (mask_x[W-1:0]), .product (p)
  );

  wallacetree8cma #(.N(H)) u2 (
    .a (ah), .b (bl), .mask_x (mask_x[W+H-1:H]), .product (q)
  );

  wallacetree8cma #(.N(H)) u3 (
    .a (al), .b (bh), .mask_x (mask_x[W+H-1:H]), .product (r)
  );

  wallacetree8cma #(.N(H)) u4 (
    .a (ah), .b (bh), .mask_x (mask_x[2*N-1:W]), .product (s)
  );

  // x = q + r, both at weight 2^8.
  cma #(.K(W)) add21cma (
    .a (q), .b (r), .mask_x (mask_x[W+H-1:H]), .sum (x), .cout (c1)
  );

  // y = x + p[15:8], at weight 2^8.
  always_comb p_hi_ext = W'(p[W-1:H]);

  cma #(.K(W)) add22cma (
    .a (x), .b (p_hi_ext), .mask_x (mask_x[W+H-1:H]), .sum (y), .cout (c2)
  );

  // z = s + y[15:8] + (c1 + c2) * 2^8, at weight 2^16. The two carries, both
  // of weight 2^24, are added as a two-bit number in bits 9:8.
  always_comb y_hi_ext = {{(W-H-2){1'b0}}, c1 & c2, c1 ^ c2, y[W-1:H]};

  cma #(.K(W)) add23cma (
    .a (s), .b (y_hi_ext), .mask_x (mask_x[2*N-1:W]), .sum (z), .cout (c3)
  );

  always_comb product = {z, y[H-1:0], p[H-1:0]};

  // The exact product of two N-bit numbers fits in 2N bits.
  always_comb begin
    if (&mask_x) begin
      assert (c3 == 1'b0)
        else $error("wallacetreecsma16: carry out of the top adder in exact mode");
    end
  end

endmodule : wallacetreecsma16
