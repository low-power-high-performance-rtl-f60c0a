// tb_ci: checks the three colour interpolators and the R/G/B routing for all four
// Bayer phases, on random samples and differences, including clipping at 0 and 255.
module tb_ci;
  import eodm_pkg::*;
  int checks = 0, failures = 0;
  pix_t  p;
  logic  row_odd, col_odd;
  diff_t d_star, dd_hat, dh_hat, dv_hat;
  rgb_t  rgb;
  int    n_clip = 0;

  ci dut (.p, .row_odd, .col_odd, .d_star, .dd_hat, .dh_hat, .dv_hat, .rgb);

  function automatic int clip(input int v);
    if (v < 0) return 0;
    if (v > 255) return 255;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int er, eg, eb, P;
      p = 8'($urandom);
      {row_odd, col_odd} = 2'(n % 4);
      d_star = diff_t'($urandom_range(0, 510)) - diff_t'(255);
      dd_hat = diff_t'($urandom_range(0, 510)) - diff_t'(255);
      dh_hat = diff_t'($urandom_range(0, 510)) - diff_t'(255);
      dv_hat = diff_t'($urandom_range(0, 510)) - diff_t'(255);
      #1;
      P = int'(p);
      if (row_odd == col_odd) begin           // green centre
        eg = P;
        if (!row_odd) begin er = clip(P - int'(dh_hat)); eb = clip(P - int'(dv_hat)); end
        else          begin eb = clip(P - int'(dh_hat)); er = clip(P - int'(dv_hat)); end
      end else begin
        eg = clip(P + int'(d_star));
        if (!row_odd) begin er = P; eb = clip(eg - int'(dd_hat)); end
        else          begin eb = P; er = clip(eg - int'(dd_hat)); end
      end
      if (P + int'(d_star) > 255 || P + int'(d_star) < 0) n_clip++;
      checks++;
      if (int'(rgb.r) != er || int'(rgb.g) != eg || int'(rgb.b) != eb) begin
        failures++;
        if (failures < 10) $display("FAIL phase %0d%0d got %0d/%0d/%0d exp %0d/%0d/%0d", row_odd, col_odd,
                                    rgb.r, rgb.g, rgb.b, er, eg, eb);
      end
    end
    checks++;
    if (n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
