// tb_zs_window_buffer -- shifts random columns into the window and checks
// every neighbour against a 3x3 picture kept in the testbench (column
// shifting, P1..P8 placement, clear and hold).
module tb_zs_window_buffer;
  import zs_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clear = 1'b0, shift = 1'b0;
  logic [2:0] col_in = '0;
  window_t    win;
  int checks = 0, failures = 0;
  bit pic [3][3];  // [row][column], row 0 = above

  zs_window_buffer dut (.clk(clk), .rst_n(rst_n), .clear(clear), .shift(shift),
                        .col_in(col_in), .win(win));

  always #5 clk = ~clk;

  task automatic compare(string what);
    bit e [10];
    e[1] = pic[2][0]; e[2] = pic[2][1]; e[3] = pic[2][2]; e[4] = pic[1][2];
    e[5] = pic[0][2]; e[6] = pic[0][1]; e[7] = pic[0][0]; e[8] = pic[1][0];
    checks++;
    if (win.center !== pic[1][1]) begin
      failures++;
      $display("FAIL %s centre %b expected %b", what, win.center, pic[1][1]);
    end
    for (int k = 1; k <= 8; k++) begin
      checks++;
      if (win.nb[k] !== e[k]) begin
        failures++;
        $display("FAIL %s P%0d=%b expected %b", what, k, win.nb[k], e[k]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) pic[r][c] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare("after reset");
    for (int i = 0; i < 200; i++) begin
      int op;
      op = int'($urandom_range(9));
      col_in = 3'($urandom);
      clear  = (op == 0);
      shift  = (op >= 3);
      @(negedge clk);
      if (op == 0) begin
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) pic[r][c] = 1'b0;
      end else if (op >= 3) begin
        for (int r = 0; r < 3; r++) begin
          pic[r][0] = pic[r][1];
          pic[r][1] = pic[r][2];
          pic[r][2] = col_in[r];
        end
      end
      compare(op == 0 ? "clear" : (op >= 3 ? "shift" : "hold"));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
