// tb_cdc: checks the five-tap colour-difference unit against the formula
// green-minus-chroma = (n_a+n_b)/2 - (c_l+2c_c+c_r)/4 (negated for a green centre),
// on random and extreme samples.
module tb_cdc;
  import eodm_pkg::*;
  int checks = 0, failures = 0;
  pix_t  n_a, n_b, c_l, c_c, c_r;
  logic  g;
  diff_t d;

  cdc dut (.n_a, .n_b, .c_l, .c_c, .c_r, .centre_green(g), .d);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int a, b, e;
      {n_a, n_b, c_l, c_c, c_r} = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      g = 1'($urandom);
      if (n == 0) begin {n_a, n_b, c_l, c_c, c_r} = {8'd255, 8'd255, 8'd0, 8'd0, 8'd0}; g = 0; end
      if (n == 1) begin {n_a, n_b, c_l, c_c, c_r} = {8'd255, 8'd255, 8'd0, 8'd0, 8'd0}; g = 1; end
      #1;
      a = (int'(n_a) + int'(n_b)) / 2;
      b = (int'(c_l) + 2 * int'(c_c) + int'(c_r)) / 4;
      e = g ? b - a : a - b;
      checks++;
      if (int'(d) != e) begin
        failures++;
        if (failures < 10) $display("FAIL %0d %0d %0d %0d %0d g=%0d got %0d exp %0d", n_a, n_b, c_l, c_c, c_r, g, d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
