// tb_wdcdc: drives random 5 x 7 windows (one per clock, all four Bayer phases of
// the centre) into the weighting directional colour-difference calculator and checks
// the raw differences one clock later and the weighted ones two clocks later against
// the integer reference model.
module tb_wdcdc;
  import eodm_pkg::*;
  import eodm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pix_t  win [WIN_ROWS][WIN_COLS];
  logic  centre_green;
  diff_t d_h [3][3];
  diff_t d_v [3][3];
  diff_t d_d [4];
  diff_t dh_hat, dv_hat, dd_hat;

  wdcdc dut (.*);

  always #5 clk = ~clk;

  ref_t hist [$];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    // window centre placed at (i, j) = (2 + py, 3 + px) of a 7 x 9 scratch image
    img = new[7];
    foreach (img[y]) img[y] = new[9];
    for (int r = 0; r < WIN_ROWS; r++) for (int c = 0; c < WIN_COLS; c++) win[r][c] = '0;
    centre_green = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int py, pxx;
      ref_t o;
      py = n % 2;
      pxx = (n / 2) % 2;
      foreach (img[y, x]) img[y][x] = (n % 50 == 7) ? (((x + y) % 2) ? 255 : 0) : int'($urandom_range(0, 255));
      for (int r = 0; r < WIN_ROWS; r++)
        for (int c = 0; c < WIN_COLS; c++) win[r][c] = pix_t'(img[py + r][pxx + c]);
      centre_green = is_green(2 + py, 3 + pxx);
      o = compute(2 + py, 3 + pxx);
      hist.push_back(o);
      @(posedge clk);
      #1;
      // stage 2 output: differences of this window
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          cmp(int'(d_h[a][b]), o.dh[a][b], $sformatf("d_h[%0d][%0d]", a, b));
          cmp(int'(d_v[a][b]), o.dv[a][b], $sformatf("d_v[%0d][%0d]", a, b));
        end
      for (int k = 0; k < 4; k++) cmp(int'(d_d[k]), o.dd[k], $sformatf("d_d[%0d]", k));
      // stage 3 output: weighted values of the previous window
      if (hist.size() == 2) begin
        ref_t p;
        p = hist.pop_front();
        cmp(int'(dh_hat), p.dh_hat, "dh_hat");
        cmp(int'(dv_hat), p.dv_hat, "dv_hat");
        cmp(int'(dd_hat), p.dd_hat, "dd_hat");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
