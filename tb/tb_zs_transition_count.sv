// tb_zs_transition_count -- exhaustive test of S(Pi): all 256 neighbour
// patterns, each compared with a walk P1 -> P2 -> ... -> P8 -> P1 counting
// black-to-white steps, plus the three examples of the transition figure.
module tb_zs_transition_count;
  import zs_pkg::*;

  nb_t        nb;
  logic [2:0] count;
  int checks = 0, failures = 0;

  zs_transition_count dut (.nb(nb), .count(count));

  // Build P8..P1 from a 3x3 picture given as rows top/mid/bottom, each
  // {left, centre, right}.
  function automatic nb_t from_rows(logic [2:0] top, logic [2:0] mid, logic [2:0] bot);
    nb_t v;
    v[7] = top[2]; v[6] = top[1]; v[5] = top[0];
    v[8] = mid[2];                v[4] = mid[0];
    v[1] = bot[2]; v[2] = bot[1]; v[3] = bot[0];
    return v;
  endfunction

  task automatic check(nb_t v, int exp_s);
    nb = v;
    #1;
    checks++;
    if (int'(count) != exp_s) begin
      failures++;
      $display("FAIL nb=%b S=%0d expected %0d", v, count, exp_s);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      int s, cur, nxt;
      s = 0;
      for (int k = 0; k < 8; k++) begin
        cur = (v >> k) & 1;
        nxt = (v >> ((k + 1) % 8)) & 1;
        if (cur == 1 && nxt == 0) s++;
      end
      check(nb_t'(v), s);
    end
    // The figure's three examples: S = 1, 2 and 3.
    check(from_rows(3'b111, 3'b110, 3'b100), 1);
    check(from_rows(3'b111, 3'b110, 3'b010), 2);
    check(from_rows(3'b010, 3'b110, 3'b010), 3);
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
