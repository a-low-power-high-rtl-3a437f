// tb_cma: tests the 16-bit carry-maskable adder against a loop-level model
// of the cell rules, and checks the three configurations the adder is meant
// for: mask all ones (exact adder, {cout, sum} = a + b), mask all zeros
// (sum = a | b, cout = 0) and low-m masking (high part adds exactly, low m
// bits are a | b, error a & b in the low m bits).
module tb_cma;
  import approx_ref_pkg::*;

  logic [15:0] a, b, mask_x, sum;
  logic        cout;
  int checks = 0, failures = 0;

  cma dut (.a(a), .b(b), .mask_x(mask_x), .sum(sum), .cout(cout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%h b=%h mask=%h -> cout=%b sum=%h", what, a, b, mask_x, cout, sum);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned m;
    logic [15:0] lo;
    // Full carry propagation through all 16 cells.
    a = 16'hffff; b = 16'h0001; mask_x = '1; #1;
    check({cout, sum} == 17'h10000, "full ripple");
    // Masking bit 0 kills the ripple that starts there.
    mask_x = 16'hfffe; #1;
    check({cout, sum} == 17'h0ffff, "masked LSB");
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      // exact
      mask_x = '1; #1;
      check({cout, sum} == 17'(a) + 17'(b), "exact");
      // OR mode
      mask_x = '0; #1;
      check(sum == (a | b) && cout == 1'b0, "all masked");
      // low-m masking
      m = $urandom_range(0, 16);
      mask_x = 16'(low_mask(m)); #1;
      lo = ~mask_x;
      check((sum & lo) == ((a | b) & lo), "low bits OR");
      check(17'(a) + 17'(b) - {cout, sum} == 17'(a & b & lo), "low-m error");
      // arbitrary masks against the cell-rule model
      mask_x = 16'($urandom); #1;
      check({cout, sum} == cma_ref(a, b, mask_x), "random mask");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cma
