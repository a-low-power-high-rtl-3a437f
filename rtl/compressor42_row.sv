// compressor42_row: one layer of a 4:2 compressor tree over N columns.
//
// Reduces four N-bit vectors w, x, y, z to a sum vector s and a carry vector c
// (already shifted to its weight) with w + x + y + z = s + c modulo 2^N. Each
// column i holds one 4:2 compressor; its cout goes to the cin of column i+1,
// column 0 has cin = 0, and whatever leaves column N-1 is dropped. In a
// multiplier whose product fits in N bits the dropped weight 2^N does not
// change the result. Purely combinational; the delay is that of two full
// adders whatever N is.
module compressor42_row #(
  parameter int unsigned N = approx_mult_pkg::CMA_W
) (
  input  logic [N-1:0] w,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  logic [N:0] chain;   // chain[i] is the cin of column i
  logic [N:0] carry;   // carry[i] is the carry out of column i-1

  assign chain[0] = 1'b0;
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_col
    compressor42 u_c42 (
      .x1    (w[i]),
      .x2    (x[i]),
      .x3    (y[i]),
      .x4    (z[i]),
      .cin   (chain[i]),
      .sum   (s[i]),
      .carry (carry[i+1]),
      .cout  (chain[i+1])
    );
  end

  assign c = carry[N-1:0];

endmodule : compressor42_row
