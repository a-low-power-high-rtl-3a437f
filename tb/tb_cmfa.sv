// tb_cmfa: exhaustive test of the carry-maskable full adder. mask_x = 1:
// exact full adder; mask_x = 0: s = x | y, cout = cin.
module tb_cmfa;
  logic mask_x, x, y, cin, s, cout;
  int checks = 0, failures = 0;

  cmfa dut (.mask_x(mask_x), .x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic es, ec;
    for (int v = 0; v < 16; v++) begin
      {mask_x, x, y, cin} = 4'(v);
      #1;
      if (mask_x) begin
        {ec, es} = 2'(x) + 2'(y) + 2'(cin);
      end else begin
        es = x | y;
        ec = cin;
      end
      checks++;
      if (s !== es || cout !== ec) begin
        failures++;
        $display("FAIL mask=%b x=%b y=%b cin=%b: s=%b cout=%b (want %b %b)",
                 mask_x, x, y, cin, s, cout, es, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cmfa
