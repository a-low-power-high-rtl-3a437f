// tb_compressor42_row: random and corner-case test of a 16-column 4:2
// compressor layer: s + c must equal w + x + y + z modulo 2^16.
module tb_compressor42_row;
  logic [15:0] w, x, y, z, s, c;
  int checks = 0, failures = 0;

  compressor42_row dut (.w(w), .x(x), .y(y), .z(z), .s(s), .c(c));

  task automatic check;
    #1;
    checks++;
    if (16'(s + c) !== 16'(w + x + y + z)) begin
      failures++;
      $display("FAIL w=%h x=%h y=%h z=%h: s=%h c=%h", w, x, y, z, s, c);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {w, x, y, z} = '0;         check();
    {w, x, y, z} = '1;         check();
    w = 16'h00ff; x = 16'h00ff; y = 16'h00ff; z = 16'h00ff; check();
    for (int i = 0; i < 20000; i++) begin
      w = 16'($urandom); x = 16'($urandom);
      y = 16'($urandom); z = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_compressor42_row
