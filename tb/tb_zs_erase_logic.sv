// tb_zs_erase_logic -- exhaustive test of the erase decision: all 512 3x3
// windows in both sub-iterations, compared with the reference model's
// decision for the same window placed in the middle of a 3x3 image, plus
// the two examples of the window figure (N = 1 and N = 7: not erased).
module tb_zs_erase_logic;
  import zs_pkg::*;
  import zs_ref_pkg::*;

  window_t  win;
  zs_step_e step;
  logic     erase;
  int checks = 0, failures = 0;
  int n_erased = 0;

  zs_erase_logic dut (.win(win), .step(step), .erase(erase));

  initial begin
    ZsRef m;
    m = new(3, 3);
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 512; v++) begin
        bit exp_e;
        // v bit 3*r + c is pixel (r, c) of the 3x3 picture
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            m.img[r][c] = bit'((v >> (3 * r + c)) & 1);
        exp_e = m.should_erase(1, 1, bit'(s), 1'b0);
        win.center = m.img[1][1];
        win.nb[1]  = m.img[2][0];
        win.nb[2]  = m.img[2][1];
        win.nb[3]  = m.img[2][2];
        win.nb[4]  = m.img[1][2];
        win.nb[5]  = m.img[0][2];
        win.nb[6]  = m.img[0][1];
        win.nb[7]  = m.img[0][0];
        win.nb[8]  = m.img[1][0];
        step = (s == 0) ? ZS_STEP1 : ZS_STEP2;
        #1;
        checks++;
        if (erase) n_erased++;
        if (erase !== exp_e) begin
          failures++;
          $display("FAIL step=%0d window=%b erase=%b expected %b", s + 1, v, erase, exp_e);
        end
      end
    end
    // The window figure: an end point (N = 1) and an interior point (N = 7).
    step = ZS_STEP1;
    win  = '{nb: 8'b0000_1000, center: 1'b1};  // only P4 black
    #1; checks++; if (erase) begin failures++; $display("FAIL end point erased"); end
    win  = '{nb: 8'b1111_1101, center: 1'b1};  // all but P2 black
    #1; checks++; if (erase) begin failures++; $display("FAIL interior point erased"); end
    // Some windows must be erased in each step, otherwise the test is empty.
    checks++;
    if (n_erased == 0) begin failures++; $display("FAIL nothing ever erased"); end
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
