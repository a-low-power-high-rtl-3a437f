// cmfa: carry-maskable full adder.
//
// mask_x is active low. With mask_x = 1 the cell is an exact full adder. With
// mask_x = 0 the cell stops adding: its sum output is the OR of the two data
// inputs and the incoming carry is handed on unchanged (cout = cin), so the
// cell adds no delay of its own to the carry path. In a chain whose low
// cells are all masked the carry is 0 throughout the masked part.
// Purely combinational; written at the equation level rather than as the
// published gate netlist.
module cmfa (
  input  logic mask_x,  // 1: accurate, 0: carry masked (OR, carry passed on)
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    if (mask_x) begin
      s    = x ^ y ^ cin;
      cout = (x & y) | (x & cin) | (y & cin);
    end else begin
      s    = x | y;
      cout = cin;
    end
  end

endmodule : cmfa
