// tb_icac_row: tests an eight-cell iCAC row. Checks the worked example
// A = 01011111, B = 00110110 -> P = 01111111, Q = 00010110, S = 10010101,
// then exhaustively that P = A | B, Q = A & B and A + B = P + Q.
module tb_icac_row;
  logic [7:0] a, b, p, q;
  int checks = 0, failures = 0;

  icac_row dut (.a(a), .b(b), .p(p), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b p=%b q=%b", what, a, b, p, q);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'b01011111;
    b = 8'b00110110;
    #1;
    check(p == 8'b01111111, "example P");
    check(q == 8'b00010110, "example Q");
    check(9'(p) + 9'(q) == 9'b010010101, "example S = P + Q");
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      check(p == (a | b), "P");
      check(q == (a & b), "Q");
      check(9'(a) + 9'(b) == 9'(p) + 9'(q), "A + B = P + Q");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_icac_row
