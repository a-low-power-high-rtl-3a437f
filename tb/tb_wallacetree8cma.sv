// tb_wallacetree8cma: tests the 8 x 8 accuracy-controllable multiplier.
//  - Exhaustively, with every mask bit set, the product is exact.
//  - The sub-products of the published 16 x 16 example are reproduced.
//  - With random masks, the reduction tree's two vectors still add to the
//    exact product and the output equals a carry-maskable addition of them
//    (loop-level reference model).
//  - With the low m bits masked, the product is never above the exact one
//    and at most 2^m - 1 below it.
module tb_wallacetree8cma;
  import approx_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] mask_x, product;
  int checks = 0, failures = 0;

  wallacetree8cma dut (.a(a), .b(b), .mask_x(mask_x), .product(product));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d mask=%h -> %0d", what, a, b, mask_x, product);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exact, m;
    logic [16:0] r;
    // Sub-products of 27173 x 19083 (a = 0x6a25, b = 0x4a8b).
    mask_x = '1;
    a = 8'h25; b = 8'h8b; #1; check(product == 16'h1417, "example p");
    a = 8'h6a; b = 8'h8b; #1; check(product == 16'h398e, "example q");
    a = 8'h25; b = 8'h4a; #1; check(product == 16'h0ab2, "example r");
    a = 8'h6a; b = 8'h4a; #1; check(product == 16'h1ea4, "example s");
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      mask_x = '1; #1;
      check(product == 16'(int'(a) * int'(b)), "exact");
    end
    for (int i = 0; i < 30000; i++) begin
      a = 8'($urandom); b = 8'($urandom);
      exact = int'(a) * int'(b);
      mask_x = 16'($urandom); #1;
      check(16'(dut.s_vec + dut.c_vec) == 16'(exact), "tree vectors");
      r = cma_ref(dut.s_vec, dut.c_vec, mask_x);
      check(product == r[15:0], "final adder");
      m = $urandom_range(0, 16);
      mask_x = 16'(low_mask(m)); #1;
      check(int'(product) <= int'(exact) && int'(exact) - int'(product) < (1 << m),
            "low-m error bound");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_wallacetree8cma
