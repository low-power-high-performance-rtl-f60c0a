// tb_eodm_top: end-to-end test of the demosaicking pipeline on a reduced frame size.
//
// Streams test frames (vertical and horizontal stripes, ramps, slanted edges and
// noise, sampled through the GRBG filter) into eodm_top with random input pauses,
// including a frame that is cut short and followed by a new start of frame. Every
// output pixel is compared, position, edge type and RGB, with the integer reference
// model, and the latency from the sample that completes a window to the output is
// checked to be five clocks. It also counts how often each mechanism occurred (input
// pauses, frame restart, each of the five edge types, red / blue / green centres,
// clipping, all four line-buffer rotations) and fails for any that never did.
module tb_eodm_top;
  import eodm_pkg::*;
  import eodm_ref_pkg::*;

  localparam int W = 48;
  localparam int H = 20;
  localparam int NFRAMES = 3;
  localparam int MAX_CYCLES = 200000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  pix_t in_pix = '0;
  logic out_valid;
  rgb_t out_rgb;
  logic [$clog2(W)-1:0] out_x;
  logic [$clog2(H)-1:0] out_y;
  edge_type_e out_type;

  eodm_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int x, y, r, g, b, c, stamp;
  } exp_t;
  exp_t exp_q [$];

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_stall = 0, n_restart = 0, n_clip = 0, n_out = 0;
  int n_type [5];
  int n_case [3];   // 0: red centre, 1: blue centre, 2: green centre
  int n_rot  [4];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // send the first `rows` rows of a new frame
  task automatic send_frame(input int rows, input int seed);
    make_frame(H, W, seed);
    for (int y = 0; y < rows; y++)
      for (int x = 0; x < W; x++) begin
        while ($urandom_range(0, 7) == 0) begin
          @(negedge clk);
          in_valid = 0;
          in_sof   = 0;
          n_stall++;
        end
        @(negedge clk);
        in_valid = 1;
        in_sof   = (x == 0 && y == 0);
        in_pix   = pix_t'(img[y][x]);
        if (x == 0) n_rot[y % 4]++;
        if (y >= 4 && x >= 6) begin
          ref_t o;
          exp_t e;
          o = compute(y - 2, x - 3);
          e.x = x - 3; e.y = y - 2; e.r = o.r; e.g = o.g; e.b = o.b; e.c = o.c;
          e.stamp = cyc;
          exp_q.push_back(e);
          if (is_green(y - 2, x - 3)) n_case[2]++;
          else n_case[(y - 2) % 2]++;
          if ((!is_green(y - 2, x - 3) && (img[y - 2][x - 3] + o.d_star < 0 || img[y - 2][x - 3] + o.d_star > 255))
              || (is_green(y - 2, x - 3) && (img[y - 2][x - 3] - o.dh_hat < 0 || img[y - 2][x - 3] - o.dh_hat > 255)))
            n_clip++;
        end
      end
    @(negedge clk);
    in_valid = 0;
    in_sof   = 0;
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      if (exp_q.size() == 0) check(0, $sformatf("unexpected output at (%0d,%0d) cycle %0d", out_y, out_x, cyc));
      else begin
        exp_t e;
        e = exp_q.pop_front();
        check(int'(out_x) == e.x && int'(out_y) == e.y,
              $sformatf("position got (%0d,%0d) exp (%0d,%0d)", out_y, out_x, e.y, e.x));
        check(int'(out_rgb.r) == e.r && int'(out_rgb.g) == e.g && int'(out_rgb.b) == e.b,
              $sformatf("rgb at (%0d,%0d) got %0d/%0d/%0d exp %0d/%0d/%0d", e.y, e.x,
                        out_rgb.r, out_rgb.g, out_rgb.b, e.r, e.g, e.b));
        check(int'(out_type) == e.c, $sformatf("type at (%0d,%0d) got %0d exp %0d", e.y, e.x, out_type, e.c));
        // sample accepted at edge stamp+1, output registered at edge stamp+6 and
        // seen here one edge later: out_valid is set by the 5th edge after acceptance
        check(cyc - e.stamp == 6, $sformatf("latency %0d", cyc - e.stamp - 1));
        n_type[e.c]++;
      end
    end
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_frame(H, 1);
    send_frame(11, 2);          // cut short: next frame restarts with in_sof
    n_restart++;
    for (int f = 2; f < NFRAMES + 1; f++) send_frame(H, f + 1);
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d outputs missing", exp_q.size()));
    $display("outputs=%0d stalls=%0d restarts=%0d clipped=%0d", n_out, n_stall, n_restart, n_clip);
    $display("types: Hn=%0d Hs=%0d Vn=%0d Vs=%0d none=%0d", n_type[0], n_type[1], n_type[2], n_type[3], n_type[4]);
    $display("centres: R=%0d B=%0d G=%0d rotations=%0d/%0d/%0d/%0d", n_case[0], n_case[1], n_case[2],
             n_rot[0], n_rot[1], n_rot[2], n_rot[3]);
    check(n_stall > 0, "no input pause");
    check(n_restart > 0, "no frame restart");
    check(n_clip > 0, "no clipping");
    for (int k = 0; k < 5; k++) check(n_type[k] > 0, $sformatf("edge type %0d never seen", k));
    for (int k = 0; k < 3; k++) check(n_case[k] > 0, $sformatf("centre case %0d never seen", k));
    for (int k = 0; k < 4; k++) check(n_rot[k] > 0, $sformatf("line buffer %0d never written", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
