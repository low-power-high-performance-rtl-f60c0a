// tb_wc: checks the 4/2/1 weighted average of a 3 x 3 set of colour differences
// against floor((4*centre + 2*sides + corners) / 16), on random and extreme values.
module tb_wc;
  import eodm_pkg::*;
  import eodm_ref_pkg::fdiv;
  int checks = 0, failures = 0;
  diff_t centre, d_hat;
  diff_t side [4];
  diff_t corner [4];

  wc dut (.centre, .side, .corner, .d_hat);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic diff_t rnd_diff();
    return diff_t'($urandom_range(0, 510)) - diff_t'(255);
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e;
      centre = rnd_diff();
      for (int k = 0; k < 4; k++) begin side[k] = rnd_diff(); corner[k] = rnd_diff(); end
      if (n < 2) begin
        centre = (n == 0) ? 255 : -255;
        for (int k = 0; k < 4; k++) begin side[k] = centre; corner[k] = centre; end
      end
      #1;
      e = 4 * int'(centre);
      for (int k = 0; k < 4; k++) e += 2 * int'(side[k]) + int'(corner[k]);
      e = fdiv(e, 16);
      checks++;
      if (int'(d_hat) != e) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", d_hat, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
