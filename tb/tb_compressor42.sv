// tb_compressor42: exhaustive test of the 4:2 compressor. For all 32 input
// combinations: x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout), and cout
// is the majority of x1, x2, x3 (it must not depend on x4 or cin).
module tb_compressor42;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                    .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int v = 0; v < 32; v++) begin
      {cin, x4, x3, x2, x1} = 5'(v);
      #1;
      total = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      checks++;
      if (total != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL value: cin=%b x4..x1=%b%b%b%b -> cout=%b carry=%b sum=%b",
                 cin, x4, x3, x2, x1, cout, carry, sum);
      end
      checks++;
      if (cout != ((x1 & x2) | (x1 & x3) | (x2 & x3))) begin
        failures++;
        $display("FAIL cout: cin=%b x4..x1=%b%b%b%b -> cout=%b",
                 cin, x4, x3, x2, x1, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_compressor42
