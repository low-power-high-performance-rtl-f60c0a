// tb_line_buffer: streams numbered samples through the four rotating line buffers on
// a 16 x 12 frame with random input pauses and a mid-frame restart, and checks that
// each output column holds the samples of rows y-4 .. y at the same column, that
// out_x / out_y give the position, and that the column appears exactly one clock
// after the sample is accepted.
module tb_line_buffer;
  import eodm_pkg::*;
  localparam int W = 16;
  localparam int H = 12;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  pix_t in_pix = '0;
  logic out_valid;
  pix_t out_col [WIN_ROWS];
  logic [$clog2(W)-1:0] out_x;
  logic [$clog2(H)-1:0] out_y;

  line_buffer #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  int frame_id = 0;
  function automatic pix_t sample(input int f, input int y, input int x);
    return pix_t'(f * 97 + y * 31 + x * 7);
  endfunction

  // position of the sample being driven, and the expected output of the sample
  // accepted at the previous edge
  int drv_x, drv_y, drv_f;
  bit exp_v = 0;
  int exp_x, exp_y, exp_f;
  int n_stall = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_v) begin
        failures++;
        $display("FAIL out_valid=%0d exp %0d", out_valid, exp_v);
      end else if (exp_v) begin
        bit ok;
        ok = (int'(out_x) == exp_x) && (int'(out_y) == exp_y);
        for (int k = 0; k < WIN_ROWS; k++)
          if (exp_y - 4 + k >= 0 && out_col[k] != sample(exp_f, exp_y - 4 + k, exp_x)) ok = 0;
        if (!ok) begin
          failures++;
          if (failures < 10) $display("FAIL column at (%0d,%0d)", exp_y, exp_x);
        end
      end
    end
    exp_v = rst_n && in_valid;
    exp_x = drv_x; exp_y = drv_y; exp_f = drv_f;
  end

  task automatic send(input int f, input int rows);
    for (int y = 0; y < rows; y++)
      for (int x = 0; x < W; x++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 0;
          in_sof = 0;
          n_stall++;
        end
        @(negedge clk);
        in_valid = 1;
        in_sof = (x == 0 && y == 0);
        in_pix = sample(f, y, x);
        drv_x = x; drv_y = y; drv_f = f;
      end
    @(negedge clk);
    in_valid = 0;
    in_sof = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(0, H);
    send(1, 7);     // partial frame
    send(2, H);     // restarts with in_sof
    send(3, H);
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
