// tb_ts: checks the edge-type classifier on every boundary of its four ratio rules
// (exact 4x and 2x ratios and one step either side) and on random strengths.
module tb_ts;
  import eodm_pkg::*;
  int checks = 0, failures = 0;
  edge_t e_h, e_v;
  edge_type_e c;

  ts dut (.e_h, .e_v, .c);

  function automatic int expect_type(input int h, input int v);
    if (v >= 4 * h) return 0;
    if (v >= 2 * h) return 1;
    if (h >= 4 * v) return 2;
    if (h >= 2 * v) return 3;
    return 4;
  endfunction

  task automatic try_pair(input int h, input int v);
    e_h = edge_t'(h);
    e_v = edge_t'(v);
    #1;
    checks++;
    if (int'(c) != expect_type(h, v)) begin
      failures++;
      if (failures < 10) $display("FAIL h=%0d v=%0d got %0d exp %0d", h, v, c, expect_type(h, v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [5] = '{0, 0, 0, 0, 0};
    for (int base = 1; base < 256; base += 7)
      for (int dlt = -1; dlt <= 1; dlt++) begin
        try_pair(base, 4 * base + dlt);
        try_pair(base, 2 * base + dlt);
        try_pair(4 * base + dlt, base);
        try_pair(2 * base + dlt, base);
      end
    try_pair(0, 0);
    for (int n = 0; n < 3000; n++) begin
      try_pair($urandom_range(0, 1020), $urandom_range(0, 1020));
      seen[int'(c)]++;
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL type %0d never produced", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
