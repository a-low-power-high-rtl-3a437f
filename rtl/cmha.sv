// cmha: carry-maskable half adder.
//
// mask_x is active low. With mask_x = 1 the cell is an exact half adder
// (s = x ^ y, cout = x & y). With mask_x = 0 the carry is masked: cout = 0
// and s = x | y, so the cell degenerates into an OR gate and no carry chain
// starts here. This is the least significant cell of a carry-maskable adder.
// Purely combinational; the behaviour is written at the equation level rather
// than as the published gate netlist.
module cmha (
  input  logic mask_x,  // 1: accurate, 0: carry masked (OR)
  input  logic x,
  input  logic y,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = mask_x ? (x ^ y) : (x | y);
    cout = mask_x & x & y;
  end

endmodule : cmha
