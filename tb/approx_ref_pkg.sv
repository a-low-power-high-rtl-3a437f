// approx_ref_pkg: reference models for the multiplier testbenches.
//
// cma_ref is a loop-level model of a 16-bit carry-maskable adder written
// from the cell rules alone: a cell whose mask bit is 1 adds exactly, a cell
// whose mask bit is 0 outputs x | y and passes the incoming carry on, and
// bit 0 has no carry input (a masked bit 0 emits carry 0). It returns
// {carry out, sum}.
package approx_ref_pkg;

  function automatic logic [16:0] cma_ref(input logic [15:0] a,
                                          input logic [15:0] b,
                                          input logic [15:0] mask_x);
    logic [15:0] s;
    logic        c;
    c = 1'b0;
    for (int i = 0; i < 16; i++) begin
      if (mask_x[i]) begin
        s[i] = a[i] ^ b[i] ^ c;
        c    = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
      end else begin
        s[i] = a[i] | b[i];
      end
    end
    return {c, s};
  endfunction

  // Mask with the low m bits cleared (carry masked) and the rest set.
  function automatic logic [31:0] low_mask(input int unsigned m);
    logic [31:0] v;
    v = '1;
    for (int i = 0; i < 32; i++) if (i < int'(m)) v[i] = 1'b0;
    return v;
  endfunction

endpackage : approx_ref_pkg
