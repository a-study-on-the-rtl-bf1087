// tb_gdi_and -- exhaustive test of the GDI AND cell model in its 2-, 3- and
// 4-input sizes against the AND of the inputs.
module tb_gdi_and;
  logic [3:0] a;
  logic y2, y3, y4;
  int checks = 0, failures = 0;

  gdi_and #(.N(2)) dut2 (.a(a[1:0]), .y(y2));
  gdi_and #(.N(3)) dut3 (.a(a[2:0]), .y(y3));
  gdi_and #(.N(4)) dut4 (.a(a),      .y(y4));

  initial begin
    for (int v = 0; v < 16; v++) begin
      a = 4'(v);
      #1;
      checks += 3;
      if (y2 !== (a[0] & a[1]))                 begin failures++; $display("FAIL AND2 a=%b", a); end
      if (y3 !== (a[0] & a[1] & a[2]))          begin failures++; $display("FAIL AND3 a=%b", a); end
      if (y4 !== (a[0] & a[1] & a[2] & a[3]))   begin failures++; $display("FAIL AND4 a=%b", a); end
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
