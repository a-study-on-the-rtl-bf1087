// tb_zs_thinning_core -- the thinning core on a small image (14 x 11) with
// two image memories modelled in the testbench (synchronous read, one cycle
// latency). For a series of random images it checks the final skeleton
// against the reference model, the iteration count, the number of erased
// pixels, the cycle count from start to done, and that every read and write
// stays inside the image and goes to the right buffer.
module tb_zs_thinning_core;
  import zs_pkg::*;
  import zs_ref_pkg::*;

  localparam int W = 14, H = 11, AW = $clog2(W * H), IW = 8;
  localparam int SUB_CYCLES = H * (5 + 5 * W) + 1;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic          busy, done, src_sel, rd_en, rd_data, wr_en, wr_data, erase_pulse;
  logic [IW-1:0] iter_count;
  zs_step_e      step;
  logic [AW-1:0] rd_addr, wr_addr;
  int checks = 0, failures = 0;

  bit mem [2][W*H];

  zs_thinning_core #(.W(W), .H(H)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .iter_count(iter_count), .src_sel(src_sel), .step(step),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data), .erase_pulse(erase_pulse));

  always #5 clk = ~clk;

  int bad_access = 0, erase_seen = 0;
  always_ff @(posedge clk) begin
    if (rd_en) begin
      if (int'(rd_addr) >= W * H) bad_access++;
      else rd_data <= mem[src_sel][rd_addr];
    end
    if (wr_en) begin
      if (int'(wr_addr) >= W * H) bad_access++;
      else mem[!src_sel][wr_addr] <= wr_data;
    end
    if (erase_pulse) erase_seen++;
  end

  task automatic run_one(ZsRef m, string name);
    int cyc, e_before, iters, exp_erased;
    exp_erased = m.erased_step1 + m.erased_step2;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        mem[0][r * W + c] = m.img[r][c];
        mem[1][r * W + c] = 1'($urandom);
      end
    iters = m.run();
    exp_erased = m.erased_step1 + m.erased_step2 - exp_erased;
    e_before = erase_seen;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 2000000) begin
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
      $display("FAIL %s: iter_count %0d expected %0d", name, iter_count, iters);
    end
    checks++;
    if (erase_seen - e_before != exp_erased) begin
      failures++;
      $display("FAIL %s: %0d erasures, expected %0d", name, erase_seen - e_before, exp_erased);
    end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (mem[0][r * W + c] != m.img[r][c]) begin
          failures++;
          $display("FAIL %s: pixel (%0d,%0d) = %b expected %b", name, r, c,
                   mem[0][r * W + c], m.img[r][c]);
        end
      end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL %s: still busy after done", name); end
  endtask

  initial begin
    ZsRef m;
    m = new(H, W);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // full black image, an empty image, then random shapes
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) m.img[r][c] = 1'b1;
    run_one(m, "all black");
    m.clear();
    run_one(m, "all white");
    for (int t = 0; t < 12; t++) begin
      m.random_blobs(1 + t % 4);
      run_one(m, $sformatf("blobs %0d", t));
    end
    m.ridges(6, 3);
    run_one(m, "ridges");
    checks++;
    if (bad_access != 0) begin failures++; $display("FAIL %0d out-of-range accesses", bad_access); end
    $display("erased step1=%0d step2=%0d", m.erased_step1, m.erased_step2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
