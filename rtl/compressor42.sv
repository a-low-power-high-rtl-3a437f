// compressor42: 4:2 compressor made of two full adders.
//
// Inputs x1..x4 and cin have weight 1; sum has weight 1, carry and cout have
// weight 2, and x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout). The first
// full adder adds x1, x2 and x3; its carry leaves as cout, which feeds the cin
// of the compressor one column up, so cout never depends on cin and the
// cin-to-cout path does not ripple along a row. The second full adder adds
// the first one's sum, x4 and cin and gives sum and carry. Purely
// combinational.
module compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s1;

  full_adder u_fa1 (
    .a     (x1),
    .b     (x2),
    .c     (x3),
    .sum   (s1),
    .carry (cout)
  );

  full_adder u_fa2 (
    .a     (s1),
    .b     (x4),
    .c     (cin),
    .sum   (sum),
    .carry (carry)
  );

endmodule : compressor42
