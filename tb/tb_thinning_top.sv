// tb_thinning_top -- end-to-end test of the thinning processor at its
// default size (96 x 96 pixels), driven only through the host ports.
//
// For each image the testbench loads the picture through the load port,
// starts the processor, waits for done, reads the result back through the
// readout port and compares it with the reference model: every pixel, the
// iteration count and the cycle count (2 * iterations * (H*(5+5W)+1) + 1).
// Images: a fingerprint-like pattern of slanted ridges, random blobs, an
// all-black and an all-white image. While a run is busy it also tries to
// overwrite the image and to start again, both of which must be ignored.
// It counts how often each mechanism happened: erasures in the first and in
// the second sub-iteration, erasures on the image border, pixels kept by
// each rule (end point, interior point, S != 1, conditions 3/4), runs of
// more than one iteration, a load and a start ignored while busy; a
// mechanism that never happened counts as a failure. The GDI primitive-cell
// row of the top is checked over all its input combinations.
module tb_thinning_top;
  import zs_pkg::*;
  import zs_ref_pkg::*;

  localparam int W = IMG_W, H = IMG_H, AW = $clog2(W * H);
  localparam int SUB_CYCLES = H * (5 + 5 * W) + 1;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic          busy, done, erase_pulse;
  logic [7:0]    iter_count;
  zs_step_e      step;
  logic          host_we = 1'b0, host_wdata = 1'b0;
  logic [AW-1:0] host_waddr = '0, host_raddr = '0;
  logic          host_rdata;
  logic [3:0]    cell_in = '0;
  logic          cell_ck = 1'b0;
  logic          cell_mux_y, cell_or_y, cell_and_y, cell_xor2_y, cell_xor3_y, cell_dff_q;
  int            n_cell_checks = 0, n_dff_edges = 0;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_erase1 = 0, n_erase2 = 0, n_multi_iter = 0, n_load_ignored = 0, n_start_ignored = 0;

  thinning_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .iter_count(iter_count), .step(step), .erase_pulse(erase_pulse),
    .host_we(host_we), .host_waddr(host_waddr), .host_wdata(host_wdata),
    .host_raddr(host_raddr), .host_rdata(host_rdata),
    .cell_in(cell_in), .cell_ck(cell_ck), .cell_mux_y(cell_mux_y), .cell_or_y(cell_or_y),
    .cell_and_y(cell_and_y), .cell_xor2_y(cell_xor2_y), .cell_xor3_y(cell_xor3_y),
    .cell_dff_q(cell_dff_q));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (erase_pulse && step == ZS_STEP1) n_erase1++;
    if (erase_pulse && step == ZS_STEP2) n_erase2++;
  end

  task automatic load(ZsRef m);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        host_we = 1'b1; host_waddr = AW'(r * W + c); host_wdata = m.img[r][c];
      end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic run_one(ZsRef m, string name, bit disturb);
    int cyc, iters;
    load(m);
    iters = m.run();
    if (iters > 1) n_multi_iter++;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 20000000) begin
      if (disturb && cyc == 1000) begin
        // try to clobber the image and to restart while busy
        host_we = 1'b1; host_waddr = '0; host_wdata = ~m.img[0][0];
        start = 1'b1;
        n_load_ignored++;
        n_start_ignored++;
      end else begin
        host_we = 1'b0;
        start = 1'b0;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 2 * iters * SUB_CYCLES + 1) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", name, cyc, 2 * iters * SUB_CYCLES + 1);
    end
    checks++;
    if (int'(iter_count) != iters) begin
      failures++;
      $display("FAIL %s: %0d iterations, expected %0d", name, iter_count, iters);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL %s: busy after done", name); end
    // read back through the host port (one cycle latency)
    for (int a = 0; a < W * H; a++) begin
      int r, c;
      host_raddr = AW'(a);
      @(negedge clk);
      r = a / W;
      c = a % W;
      checks++;
      if (host_rdata !== m.img[r][c]) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s: pixel (%0d,%0d) = %b expected %b", name, r, c, host_rdata, m.img[r][c]);
      end
    end
    $display("%s: %0d iterations, %0d cycles, %0d black pixels left", name, iters, cyc, m.black_count());
  endtask

  // The GDI cell row: every input combination, and the flip-flop taking D
  // only at rising edges of cell_ck.
  task automatic check_cells();
    logic q_exp;
    for (int v = 0; v < 16; v++) begin
      logic a, b, c, d;
      cell_in = 4'(v);
      {d, c, b, a} = cell_in;
      #1;
      checks += 5;
      n_cell_checks += 5;
      if (cell_mux_y  !== (a ? c : b))       begin failures++; $display("FAIL cell mux %b", cell_in); end
      if (cell_or_y   !== (a | b | c | d))   begin failures++; $display("FAIL cell or4 %b", cell_in); end
      if (cell_and_y  !== (a & b & c & d))   begin failures++; $display("FAIL cell and4 %b", cell_in); end
      if (cell_xor2_y !== (a ^ b))           begin failures++; $display("FAIL cell xor2 %b", cell_in); end
      if (cell_xor3_y !== (a ^ b ^ c))       begin failures++; $display("FAIL cell xor3 %b", cell_in); end
    end
    for (int i = 0; i < 20; i++) begin
      cell_in[3] = 1'($urandom);
      #1 cell_ck = 1'b1;
      q_exp = cell_in[3];
      n_dff_edges++;
      #1 cell_in[3] = ~cell_in[3];
      #1 cell_ck = 1'b0;
      #1;
      checks++;
      if (cell_dff_q !== q_exp) begin failures++; $display("FAIL cell dff q=%b expected %b", cell_dff_q, q_exp); end
    end
  endtask

  task automatic require(int count, string what);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    ZsRef m;
    m = new(H, W);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_cells();
    m.ridges(22, 11);
    run_one(m, "fingerprint ridges", 1'b1);
    m.random_blobs(4);
    run_one(m, "random blobs", 1'b0);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) m.img[r][c] = 1'b1;
    run_one(m, "all black", 1'b0);
    m.clear();
    run_one(m, "all white", 1'b0);
    require(n_erase1, "erased in sub-iteration 1");
    require(n_erase2, "erased in sub-iteration 2");
    require(m.erased_border, "erased on image border");
    require(m.kept_n_low, "kept: N < 2 (end point)");
    require(m.kept_n_high, "kept: N > 6 (interior)");
    require(m.kept_s, "kept: S != 1");
    require(m.kept_c34, "kept: conditions 3/4");
    require(n_multi_iter, "run of several iterations");
    require(n_load_ignored, "load ignored while busy");
    require(n_start_ignored, "start ignored while busy");
    require(n_cell_checks, "GDI cell row evaluated");
    require(n_dff_edges, "GDI flip-flop clock edges");
    checks++;
    if (n_erase1 + n_erase2 != m.erased_step1 + m.erased_step2) begin
      failures++;
      $display("FAIL erase pulses %0d, reference erasures %0d", n_erase1 + n_erase2,
               m.erased_step1 + m.erased_step2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
