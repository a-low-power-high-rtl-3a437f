// cma: K-bit carry-maskable adder (CMA).
//
// A ripple-carry adder whose cells can each be told to stop propagating the
// carry. Bit 0 is a carry-maskable half adder, bits 1..K-1 are carry-maskable
// full adders, chained from bit 0 upwards. mask_x[i] (active low) controls
// cell i: 1 makes it an exact adder cell, 0 makes its sum bit x|y and passes
// the carry through it unchanged. With mask_x all ones the block is an exact
// K-bit adder (sum and cout together give a + b); with mask_x all zeros it is
// K parallel OR gates; with the low m bits masked the low m sum bits are
// a|b and the carry chain only spans the upper K-m bits, which is how the
// accuracy, the delay and the switching activity are traded dynamically.
// There is no carry input. Purely combinational.
module cma #(
  parameter int unsigned K = approx_mult_pkg::CMA_W
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] mask_x,  // per-bit active-low carry mask
  output logic [K-1:0] sum,
  output logic         cout
);

  logic [K:0] c;  // c[i] is the carry into bit i

  cmha u_ha (
    .mask_x (mask_x[0]),
    .x      (a[0]),
    .y      (b[0]),
    .s      (sum[0]),
    .cout   (c[1])
  );

  for (genvar i = 1; i < K; i++) begin : g_fa
    cmfa u_fa (
      .mask_x (mask_x[i]),
      .x      (a[i]),
      .y      (b[i]),
      .cin    (c[i]),
      .s      (sum[i]),
      .cout   (c[i+1])
    );
  end

  assign c[0] = 1'b0;  // no carry input; keeps the vector fully driven
  assign cout = c[K];

endmodule : cma
