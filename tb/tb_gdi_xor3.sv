// tb_gdi_xor3 -- exhaustive test of the 3-input GDI XOR cell model (odd
// parity of the three inputs).
module tb_gdi_xor3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  gdi_xor3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, c} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      checks++;
      if (y !== logic'(ones % 2)) begin failures++; $display("FAIL a=%b b=%b c=%b y=%b", a, b, c, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
