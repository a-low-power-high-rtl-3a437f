// full_adder: exact one-bit full adder, sum = a ^ b ^ c, carry = majority.
// Used as the building block of the 4:2 compressor. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end

endmodule : full_adder
