// tb_gdi_dff -- test of the GDI master-slave flip-flop model: random data,
// changed at random points of both clock phases, must reach q only at
// rising clock edges, and q must hold between them.
module tb_gdi_dff;
  logic ck = 1'b0, d = 1'b0, q;
  logic expected;
  int checks = 0, failures = 0;

  gdi_dff dut (.ck(ck), .d(d), .q(q));

  initial begin
    // first rising edge defines q
    d = 1'b0;
    #5 ck = 1'b1;
    expected = 1'b0;
    for (int i = 0; i < 300; i++) begin
      // clock high: d changes, q must hold
      #2 d = 1'($urandom);
      #1;
      checks++;
      if (q !== expected) begin failures++; $display("FAIL q changed while clock high"); end
      #2 ck = 1'b0;
      // clock low: d changes, q must hold
      #2 d = 1'($urandom);
      #1;
      checks++;
      if (q !== expected) begin failures++; $display("FAIL q changed while clock low"); end
      #1 d = 1'($urandom);
      #1 ck = 1'b1;
      expected = d;
      #1;
      checks++;
      if (q !== expected) begin failures++; $display("FAIL q=%b after rising edge, d was %b", q, expected); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
