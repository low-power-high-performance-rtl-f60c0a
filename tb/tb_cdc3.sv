// tb_cdc3: checks the three-tap colour-difference unit, (a+b)/2 - x for a chroma
// sample and x - (a+b)/2 for a green one, on random and extreme samples.
module tb_cdc3;
  import eodm_pkg::*;
  int checks = 0, failures = 0;
  pix_t  a, b, x;
  logic  g;
  diff_t d;

  cdc3 dut (.a, .b, .x, .x_green(g), .d);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int m, e;
      {a, b, x} = {8'($urandom), 8'($urandom), 8'($urandom)};
      g = 1'($urandom);
      if (n < 2) begin a = 0; b = 0; x = 255; g = 1'(n); end
      #1;
      m = (int'(a) + int'(b)) / 2;
      e = g ? int'(x) - m : m - int'(x);
      checks++;
      if (int'(d) != e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d x=%0d g=%0d got %0d exp %0d", a, b, x, g, d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
