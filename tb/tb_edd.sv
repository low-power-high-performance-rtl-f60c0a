// tb_edd: checks the edge-strength detector, (E0 + 2*E1 + E2)/4 with
// E_l = |d[l][0]-d[l][1]| + |d[l][1]-d[l][2]|, on random and extreme values.
module tb_edd;
  import eodm_pkg::*;
  int checks = 0, failures = 0;
  diff_t d [3][3];
  edge_t e_hat;

  edd dut (.d, .e_hat);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e [3];
      int exp_e;
      for (int l = 0; l < 3; l++)
        for (int k = 0; k < 3; k++)
          d[l][k] = (n == 0) ? ((k == 1) ? diff_t'(-255) : diff_t'(255))
                             : diff_t'($urandom_range(0, 510)) - diff_t'(255);
      #1;
      for (int l = 0; l < 3; l++) begin
        int p, q;
        p = int'(d[l][0]) - int'(d[l][1]);
        q = int'(d[l][1]) - int'(d[l][2]);
        e[l] = (p < 0 ? -p : p) + (q < 0 ? -q : q);
      end
      exp_e = (e[0] + 2 * e[1] + e[2]) / 4;
      checks++;
      if (int'(e_hat) != exp_e) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", e_hat, exp_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
