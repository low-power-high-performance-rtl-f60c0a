// wdcdc: weighting directional colour-difference calculator, pipeline stages 2 and 3.
//
// From the 5 x 7 window W (centre W[2][3] = P(i,j)) it forms green-minus-chroma
// differences in three groups and registers them (stage 2):
//   d_h  horizontal differences at rows {i-2, i, i+2} x columns {j-1, j, j+1},
//        each by the five-tap cdc unit along its row (the document's equation (1)).
//   d_v  vertical differences at rows {i-1, i, i+1} x columns {j-2, j, j+2}; row i
//        uses the five-tap unit along its column (equation (2)); rows i-1 and i+1
//        use the three-tap unit, because the five-tap one would need rows i-3 and
//        i+3, which the five-line window does not hold.
//   d_d  differences at the four diagonal neighbours (i+-1, j+-1), each the mean of
//        the three-tap horizontal and vertical differences there. At a red or blue
//        centre these are the samples of the opposite chroma.
// Stage 3 registers the weighted results: dh_hat and dv_hat through the 4/2/1 wc
// kernel over the 3 x 3 sets, dd_hat the plain mean of the four diagonals.
// The two 3 x 3 position sets are those printed with the document's weighting
// matrices; the diagonal group and the three-tap units are this design's own.
// Index convention: d_h[a][b] is row offset 2a-2 and column offset b-1;
// d_v[a][b] is row offset a-1 and column offset 2b-2.
// Timing: d_h, d_v, d_d one clock after win; the hats two clocks after win.
// Free-running: no enable, the caller tracks validity.
module wdcdc
  import eodm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  pix_t  win [WIN_ROWS][WIN_COLS],
  input  logic  centre_green,
  output diff_t d_h [3][3],
  output diff_t d_v [3][3],
  output diff_t d_d [4],
  output diff_t dh_hat,
  output diff_t dv_hat,
  output diff_t dd_hat
);
  diff_t dh_c [3][3];
  diff_t dv_c [3][3];
  diff_t dd_c [4];
  diff_t ddh  [4];
  diff_t ddv  [4];
  diff_t dh_w, dv_w;

  // ---- CDC_1: horizontal differences ----
  for (genvar a = 0; a < 3; a++) begin : g_hr
    for (genvar b = 0; b < 3; b++) begin : g_hc
      localparam int R = 2 * a;      // window row
      localparam int C = b + 2;      // window column (j-1 .. j+1)
      cdc u_cdc (
        .n_a(win[R][C-1]), .n_b(win[R][C+1]),
        .c_l(win[R][C-2]), .c_c(win[R][C]), .c_r(win[R][C+2]),
        .centre_green(centre_green ^ (b != 1)),
        .d(dh_c[a][b])
      );
    end
  end

  // ---- CDC_2: vertical differences ----
  for (genvar b = 0; b < 3; b++) begin : g_vc
    localparam int C = 2 * b + 1;    // window column (j-2, j, j+2)
    cdc u_cdc_mid (
      .n_a(win[1][C]), .n_b(win[3][C]),
      .c_l(win[0][C]), .c_c(win[2][C]), .c_r(win[4][C]),
      .centre_green(centre_green),
      .d(dv_c[1][b])
    );
    cdc3 u_cdc_up (
      .a(win[0][C]), .b(win[2][C]), .x(win[1][C]),
      .x_green(!centre_green), .d(dv_c[0][b])
    );
    cdc3 u_cdc_dn (
      .a(win[2][C]), .b(win[4][C]), .x(win[3][C]),
      .x_green(!centre_green), .d(dv_c[2][b])
    );
  end

  // ---- CDC_3: diagonal differences ----
  for (genvar k = 0; k < 4; k++) begin : g_dg
    localparam int R = (k < 2) ? 1 : 3;          // i-1 or i+1
    localparam int C = (k % 2 == 0) ? 2 : 4;     // j-1 or j+1
    cdc3 u_h (.a(win[R][C-1]), .b(win[R][C+1]), .x(win[R][C]), .x_green(centre_green), .d(ddh[k]));
    cdc3 u_v (.a(win[R-1][C]), .b(win[R+1][C]), .x(win[R][C]), .x_green(centre_green), .d(ddv[k]));
    assign dd_c[k] = diff_t'(((DIFF_W+1)'(ddh[k]) + (DIFF_W+1)'(ddv[k])) >>> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          d_h[a][b] <= '0;
          d_v[a][b] <= '0;
        end
      for (int k = 0; k < 4; k++) d_d[k] <= '0;
    end else begin
      d_h <= dh_c;
      d_v <= dv_c;
      d_d <= dd_c;
    end
  end

  // ---- WC_1, WC_2: 4/2/1 weighting; WC_3: mean of the diagonals ----
  wc u_wc_h (
    .centre(d_h[1][1]),
    .side  ('{d_h[0][1], d_h[2][1], d_h[1][0], d_h[1][2]}),
    .corner('{d_h[0][0], d_h[0][2], d_h[2][0], d_h[2][2]}),
    .d_hat (dh_w)
  );
  wc u_wc_v (
    .centre(d_v[1][1]),
    .side  ('{d_v[0][1], d_v[2][1], d_v[1][0], d_v[1][2]}),
    .corner('{d_v[0][0], d_v[0][2], d_v[2][0], d_v[2][2]}),
    .d_hat (dv_w)
  );

  logic signed [DIFF_W+1:0] dd_sum;
  assign dd_sum = (DIFF_W+2)'(d_d[0]) + (DIFF_W+2)'(d_d[1]) + (DIFF_W+2)'(d_d[2]) + (DIFF_W+2)'(d_d[3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dh_hat <= '0;
      dv_hat <= '0;
      dd_hat <= '0;
    end else begin
      dh_hat <= dh_w;
      dv_hat <= dv_w;
      dd_hat <= diff_t'(dd_sum >>> 2);
    end
  end
endmodule
