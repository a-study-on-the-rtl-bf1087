// tb_image_frame_buffer -- fills a 96 x 96 image buffer with a random
// picture, then checks random reads (one-cycle latency), read-during-write
// of the same address (old value), and that rdata holds while re is low.
module tb_image_frame_buffer;
  localparam int W = 96, H = 96, AW = $clog2(W * H);

  logic          clk = 1'b0;
  logic          we = 1'b0, wdata = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic          rdata;
  int checks = 0, failures = 0;
  bit model [W*H];

  image_frame_buffer dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                          .re(re), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < W * H; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = 1'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = int'($urandom_range(W * H - 1));
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL read %0d = %b expected %b", a, rdata, model[a]);
      end
    end
    // read and write the same address in one cycle: the old value is read
    for (int i = 0; i < 50; i++) begin
      int a;
      a = int'($urandom_range(W * H - 1));
      re = 1'b1; raddr = AW'(a); we = 1'b1; waddr = AW'(a); wdata = ~model[a];
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read-during-write %0d", a); end
      model[a] = ~model[a];
      // with re low the output keeps the old value
      re = 1'b0; raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== ~model[a]) begin failures++; $display("FAIL rdata not held at %0d", a); end
      re = 1'b1;
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL new value at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
