// icac: incomplete adder cell (iCAC).
//
// A half adder computes a + b = 2c + s. Since 2c + s = (c + s) + c, the same
// sum can be written as p + q with both terms at the weight of the inputs:
// p = c | s = a | b and q = c = a & b. The cell is therefore not an
// approximation: it splits a two-bit sum into an "approximate sum" p and an
// "error recovery" bit q of equal weight, with a + b = p + q exactly.
// Purely combinational, one OR and one AND gate, as in the published cell.
module icac (
  input  logic a,
  input  logic b,
  output logic p,   // a | b, approximate sum bit
  output logic q    // a & b, error recovery bit (same weight as p)
);

  always_comb begin
    p = a | b;
    q = a & b;
  end

endmodule : icac
