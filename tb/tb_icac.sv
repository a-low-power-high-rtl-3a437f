// tb_icac: exhaustive test of the incomplete adder cell against its truth
// table (p = a | b, q = a & b) and against the identity a + b = p + q.
module tb_icac;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  icac dut (.a(a), .b(b), .p(p), .q(q));

  // Expected {q, p} for {a, b} = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b01, 2'b11};

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({q, p} !== EXP[v]) begin
        failures++;
        $display("FAIL a=%b b=%b: q=%b p=%b", a, b, q, p);
      end
      checks++;
      if (2'(a) + 2'(b) !== 2'(p) + 2'(q)) begin
        failures++;
        $display("FAIL a+b != p+q for a=%b b=%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_icac
