// tb_zs_neighbor_count -- exhaustive test of N(Pi): all 256 neighbour
// patterns, each compared with a bit-by-bit count.
module tb_zs_neighbor_count;
  import zs_pkg::*;

  nb_t        nb;
  logic [3:0] count;
  int checks = 0, failures = 0;

  zs_neighbor_count dut (.nb(nb), .count(count));

  initial begin
    for (int v = 0; v < 256; v++) begin
      int exp_n;
      nb = nb_t'(v);
      #1;
      exp_n = 0;
      for (int b = 0; b < 8; b++) if (((v >> b) & 1) == 1) exp_n++;
      checks++;
      if (int'(count) != exp_n) begin
        failures++;
        $display("FAIL nb=%b count=%0d expected %0d", nb, count, exp_n);
      end
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
