// tb_edc: checks the five candidate differences and the multiplexer choice for
// every edge type on random and extreme horizontal / vertical differences.
module tb_edc;
  import eodm_pkg::*;
  import eodm_ref_pkg::fdiv;
  int checks = 0, failures = 0;
  diff_t dh, dv, d_star;
  diff_t cand [5];
  edge_type_e c;

  edc dut (.dh, .dv, .c, .cand, .d_star);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int h, v;
      int e [5];
      h = (n == 0) ? -255 : (n == 1) ? 255 : int'($urandom_range(0, 510)) - 255;
      v = (n == 0) ? 255 : (n == 1) ? -255 : int'($urandom_range(0, 510)) - 255;
      dh = diff_t'(h);
      dv = diff_t'(v);
      c  = edge_type_e'(n % 5);
      #1;
      e[0] = h;
      e[1] = fdiv(3 * h + v, 4);
      e[2] = v;
      e[3] = fdiv(h + 3 * v, 4);
      e[4] = fdiv(h + v, 2);
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (int'(cand[k]) != e[k]) begin
          failures++;
          if (failures < 10) $display("FAIL cand%0d h=%0d v=%0d got %0d exp %0d", k, h, v, cand[k], e[k]);
        end
      end
      checks++;
      if (int'(d_star) != e[n % 5]) begin
        failures++;
        if (failures < 10) $display("FAIL mux c=%0d got %0d exp %0d", n % 5, d_star, e[n % 5]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
