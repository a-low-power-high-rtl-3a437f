// tb_pp_gen: exhaustive test of the 8 x 8 partial product generator. Every
// bit of row j in column k must be a[k-j] & b[j], and the rows must add up
// to a * b.
module tb_pp_gen;
  logic [7:0]  a, b;
  logic [15:0] rows [8];
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .rows(rows));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned acc;
    logic        e;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      acc = 0;
      for (int j = 0; j < 8; j++) begin
        acc += rows[j];
        for (int k = 0; k < 16; k++) begin
          e = (k >= j && k - j < 8) ? (a[k-j] & b[j]) : 1'b0;
          checks++;
          if (rows[j][k] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h row %0d bit %0d", a, b, j, k);
          end
        end
      end
      checks++;
      if (acc != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL a=%h b=%h: rows add to %0d", a, b, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_pp_gen
