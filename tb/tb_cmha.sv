// tb_cmha: exhaustive test of the carry-maskable half adder. mask_x = 1:
// exact half adder; mask_x = 0: s = x | y, cout = 0.
module tb_cmha;
  logic mask_x, x, y, s, cout;
  int checks = 0, failures = 0;

  cmha dut (.mask_x(mask_x), .x(x), .y(y), .s(s), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic es, ec;
    for (int v = 0; v < 8; v++) begin
      {mask_x, x, y} = 3'(v);
      #1;
      if (mask_x) begin
        {ec, es} = 2'(x) + 2'(y);
      end else begin
        es = x | y;
        ec = 1'b0;
      end
      checks++;
      if (s !== es || cout !== ec) begin
        failures++;
        $display("FAIL mask=%b x=%b y=%b: s=%b cout=%b (want %b %b)",
                 mask_x, x, y, s, cout, es, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cmha
