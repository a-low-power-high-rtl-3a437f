// tb_wallacetreecsma16: end-to-end test of the 16 x 16 accuracy-controllable
// multiplier at its default size.
//  - The published example 27173 x 19083 = 518542359 with every internal
//    value (p, q, r, s, x, y, z, carries) checked.
//  - Random operands and corner cases in exact mode (all mask bits set).
//  - Random masks: the merging adders are checked against a loop-level
//    carry-maskable adder model fed with the sub-products.
//  - Low-m masking: the product never exceeds the exact one, its error stays
//    below 7 * 2^m (four sub-multipliers and three adders each lose less
//    than 2^m), and the error is seen to grow with m.
// Counts how often each mechanism occurs (exact mode, masked mode, a switch
// between them, carry c1, carry c2, a non-zero approximation error, a carry
// passed through a masked cell) and fails if one never occurred.
module tb_wallacetreecsma16;
  import approx_ref_pkg::*;

  logic [15:0] a, b;
  logic [31:0] mask_x, product;
  int checks = 0, failures = 0;

  int n_exact = 0, n_masked = 0, n_switch = 0, n_c1 = 0, n_c2 = 0;
  int n_err = 0, n_pass = 0;
  bit last_exact = 1'b1;

  wallacetreecsma16 dut (.a(a), .b(b), .mask_x(mask_x), .product(product));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d mask=%h -> %0d", what, a, b, mask_x, product);
    end
  endtask

  // Apply one operation and record which mechanisms it exercised.
  task automatic apply(input logic [15:0] ia, input logic [15:0] ib,
                       input logic [31:0] im);
    bit is_exact;
    a = ia; b = ib; mask_x = im;
    #1;
    is_exact = &im;
    if (is_exact) n_exact++; else n_masked++;
    if (is_exact != last_exact) n_switch++;
    last_exact = is_exact;
    if (dut.c1) n_c1++;
    if (dut.c2) n_c2++;
    if (product != 32'(longint'(ia) * longint'(ib))) n_err++;
  endtask

  function automatic int unsigned count_mech(input string name, input int n);
    if (n == 0) $display("FAIL mechanism never occurred: %s", name);
    else        $display("mechanism %-26s %0d", name, n);
    return (n == 0) ? 1 : 0;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exact, err;
    int unsigned m;
    logic [16:0] rx, ry, rz;
    logic [15:0] pp, qq, rr, ss;
    longint unsigned err_sum [5];

    // Published example.
    apply(16'd27173, 16'd19083, '1);
    check(product == 32'd518542359, "example product");
    check(dut.p == 16'b0001010000010111, "example p");
    check(dut.q == 16'b0011100110001110, "example q");
    check(dut.r == 16'b0000101010110010, "example r");
    check(dut.s == 16'h1ea4, "example s");
    check(dut.x == 16'b0100010001000000, "example x");
    check(dut.y == 16'b0100010001010100, "example y");
    check(dut.z == 16'b0001111011101000, "example z");
    check({dut.c1, dut.c2, dut.c3} == 3'b000, "example carries");

    // Corner cases, exact mode.
    apply(16'hffff, 16'hffff, '1);
    check(product == 32'hfffe0001, "ffff * ffff");
    apply(16'h0000, 16'hffff, '1);
    check(product == 32'h0, "0 * ffff");
    apply(16'hffff, 16'h0001, '1);
    check(product == 32'hffff, "ffff * 1");

    for (int i = 0; i < 30000; i++) begin
      logic [15:0] ra, rb;
      ra = 16'($urandom); rb = 16'($urandom);
      exact = longint'(ra) * longint'(rb);

      // exact mode
      apply(ra, rb, '1);
      check(product == 32'(exact), "exact");
      check(dut.c3 == 1'b0, "no carry out in exact mode");

      // random mask: merging adders against the model
      apply(ra, rb, $urandom);
      pp = dut.p; qq = dut.q; rr = dut.r; ss = dut.s;
      rx = cma_ref(qq, rr, mask_x[23:8]);
      ry = cma_ref(rx[15:0], {8'h00, pp[15:8]}, mask_x[23:8]);
      rz = cma_ref(ss, {6'b0, rx[16] & ry[16], rx[16] ^ ry[16], ry[15:8]}, mask_x[31:16]);
      check(product == {rz[15:0], ry[7:0], pp[7:0]}, "merge with random mask");
      // a carry entered a masked cell of the merging adders and was passed on
      if (dut.add21cma.g_fa[8].u_fa.cin && !mask_x[16]) n_pass++;

      // low-m masking
      m = $urandom_range(0, 32);
      apply(ra, rb, low_mask(m));
      check(longint'(product) <= exact, "approximation not above exact");
      err = exact - longint'(product);
      check(err < 7 * (longint'(1) << m), "low-m error bound");
    end

    // The mean error grows with the number of masked bits.
    for (int k = 0; k < 5; k++) err_sum[k] = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] ra, rb;
      ra = 16'($urandom); rb = 16'($urandom);
      exact = longint'(ra) * longint'(rb);
      for (int k = 0; k < 5; k++) begin
        apply(ra, rb, low_mask(8 * k));
        err_sum[k] += exact - longint'(product);
      end
    end
    for (int k = 0; k < 5; k++)
      $display("low %0d bits masked: mean error %0d", 8 * k, err_sum[k] / 2000);
    check(err_sum[0] == 0, "no error with no masked bits");
    for (int k = 1; k < 5; k++) check(err_sum[k] > err_sum[k-1], "error grows with mask length");

    failures += count_mech("exact mode", n_exact);
    failures += count_mech("masked mode", n_masked);
    failures += count_mech("mode switch", n_switch);
    failures += count_mech("carry c1", n_c1);
    failures += count_mech("carry c2", n_c2);
    failures += count_mech("approximation error", n_err);
    failures += count_mech("carry through masked cell", n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_wallacetreecsma16
