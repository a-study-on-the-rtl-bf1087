// tb_gdi_cell -- exhaustive test of the GDI base cell model: all eight input
// combinations against the multiplexer function, then the four input
// configurations of the cell (OR, AND, MUX, NOT) against their truth tables.
module tb_gdi_cell;
  logic g, p, n, out;
  int checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .out(out));

  task automatic expect_out(logic e, string what);
    #1;
    checks++;
    if (out !== e) begin
      failures++;
      $display("FAIL %s: g=%b p=%b n=%b out=%b expected %b", what, g, p, n, out, e);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      expect_out((g & n) | (~g & p), "mux");
    end
    for (int v = 0; v < 4; v++) begin
      logic a, b;
      {a, b} = 2'(v);
      g = a; p = b;    n = 1'b1; expect_out(a | b, "OR");
      g = a; p = 1'b0; n = b;    expect_out(a & b, "AND");
      g = a; p = 1'b1; n = 1'b0; expect_out(~a,    "NOT");
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
