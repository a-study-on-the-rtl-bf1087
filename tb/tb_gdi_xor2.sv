// tb_gdi_xor2 -- exhaustive test of the 2-input GDI XOR cell model.
module tb_gdi_xor2;
  logic a, b, y;
  int checks = 0, failures = 0;

  gdi_xor2 dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== (a != b)) begin failures++; $display("FAIL a=%b b=%b y=%b", a, b, y); end
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
