// tb_register_bank: shifts random columns into the 5 x 7 window, holding it on idle
// cycles, and checks every register against a software copy of the last seven
// columns after each clock.
module tb_register_bank;
  import eodm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift = 0;
  pix_t col_in [WIN_ROWS];
  pix_t win [WIN_ROWS][WIN_COLS];
  pix_t model [WIN_ROWS][WIN_COLS];

  register_bank dut (.clk, .rst_n, .shift, .col_in, .win);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < WIN_ROWS; r++) begin
      col_in[r] = '0;
      for (int c = 0; c < WIN_COLS; c++) model[r][c] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      for (int r = 0; r < WIN_ROWS; r++) col_in[r] = 8'($urandom);
      if (shift)
        for (int r = 0; r < WIN_ROWS; r++) begin
          for (int c = 0; c < WIN_COLS - 1; c++) model[r][c] = model[r][c+1];
          model[r][WIN_COLS-1] = col_in[r];
        end
      @(posedge clk);
      #1;
      checks++;
      if (win != model) begin
        failures++;
        if (failures < 10) $display("FAIL window mismatch at step %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
