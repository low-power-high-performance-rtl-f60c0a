// eodm_top: edge-oriented demosaicking (EODM) engine, one RGB pixel per clock.
//
// A raster stream of 8-bit Bayer CFA samples (GRBG phase from the first pixel of the
// frame) enters on in_pix/in_valid, with in_sof on the first pixel of each frame.
// Four SRAM line buffers and a 5 x 7 register bank form the window around pixel
// (i, j); the rest is a five-stage pipeline as in the document's block diagram:
//   stage 1  window register W (register bank), fed by the line buffers
//   stage 2  directional colour differences (CDC units of the WDCDC)
//   stage 3  weighted differences (WC units) and edge strengths (EDD_1, EDD_2 = WED)
//   stage 4  edge type (TS), five candidate differences (EDC) and multiplexer
//   stage 5  colour interpolators CI_1..CI_3, output register
// Timing: the window of centre (i, j) is complete when the sample (i+2, j+3) has been
// accepted; out_valid is set by the fifth clock edge after the edge that accepts that
// sample (the accepting edge also reads the line-buffer SRAMs, the next edge loads the
// window, then come stages 2 to 5), i.e. five clocks of latency at one pixel per clock. Input may pause at any time (in_valid low); the
// pipeline after the window keeps running and simply carries empty slots.
// Borders: only centres whose whole 5 x 7 window lies inside the frame are output,
// rows 2 .. IMG_H-3 and columns 3 .. IMG_W-4, so each frame yields
// (IMG_H-4) x (IMG_W-6) pixels, each tagged with its position out_x, out_y. The
// document does not describe border handling; dropping the border is this design's
// choice. out_type reports the edge type used for the pixel.
module eodm_top
  import eodm_pkg::*;
#(
  parameter int unsigned IMG_W = 768,
  parameter int unsigned IMG_H = 512,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  pix_t          in_pix,
  output logic          out_valid,
  output rgb_t          out_rgb,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output edge_type_e    out_type
);
  // per-pixel side information that travels with the data
  typedef struct packed {
    logic          valid;
    logic [XW-1:0] x;
    logic [YW-1:0] y;
    pix_t          p;
  } meta_t;

  // ---------------- line buffers + register bank (stage 1) ----------------
  logic          lb_valid;
  pix_t          lb_col [WIN_ROWS];
  logic [XW-1:0] lb_x;
  logic [YW-1:0] lb_y;
  pix_t          win [WIN_ROWS][WIN_COLS];

  line_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_lb (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid(lb_valid), .out_col(lb_col), .out_x(lb_x), .out_y(lb_y)
  );

  register_bank u_rb (.clk, .rst_n, .shift(lb_valid), .col_in(lb_col), .win(win));

  meta_t m1, m2, m3, m4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= '0;
    end else begin
      m1.valid <= lb_valid && (32'(lb_y) >= WIN_ROWS - 1) && (32'(lb_x) >= WIN_COLS - 1);
      if (lb_valid) begin
        m1.x <= lb_x - XW'(WIN_COLS / 2);
        m1.y <= lb_y - YW'(WIN_ROWS / 2);
      end
    end
  end

  // m1.p is unused; the centre sample win[2][3] is taken into m2
  logic centre_green;
  assign centre_green = (m1.x[0] == m1.y[0]);

  // ---------------- stages 2 and 3: WDCDC ----------------
  diff_t d_h [3][3];
  diff_t d_v [3][3];
  diff_t d_d [4];
  diff_t dh_hat, dv_hat, dd_hat;

  wdcdc u_wdcdc (
    .clk, .rst_n, .win, .centre_green,
    .d_h, .d_v, .d_d, .dh_hat, .dv_hat, .dd_hat
  );

  // ---------------- stage 3: WED (EDD_1 horizontal, EDD_2 vertical) ----------------
  diff_t d_v_t [3][3];
  edge_t eh_c, ev_c, eh_hat, ev_hat;

  // vertical lines: columns of the d_v set, ordered top to bottom
  always_comb
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) d_v_t[b][a] = d_v[a][b];

  edd u_edd_1 (.d(d_h),   .e_hat(eh_c));
  edd u_edd_2 (.d(d_v_t), .e_hat(ev_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eh_hat <= '0;
      ev_hat <= '0;
      m2     <= '0;
      m3     <= '0;
    end else begin
      eh_hat <= eh_c;
      ev_hat <= ev_c;
      m2     <= m1;
      m2.p   <= win[WIN_ROWS / 2][WIN_COLS / 2];  // centre sample P(i,j)
      m3     <= m2;
    end
  end

  // ---------------- stage 4: TS, EDC, MUX ----------------
  edge_type_e c_c, c_r;
  diff_t      cand [5];
  diff_t      d_star_c, d_star_r, dd_r, dh_r, dv_r;

  ts  u_ts  (.e_h(eh_hat), .e_v(ev_hat), .c(c_c));
  edc u_edc (.dh(dh_hat), .dv(dv_hat), .c(c_c), .cand(cand), .d_star(d_star_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_r      <= EDGE_NONE;
      d_star_r <= '0;
      dd_r     <= '0;
      dh_r     <= '0;
      dv_r     <= '0;
      m4       <= '0;
    end else begin
      c_r      <= c_c;
      d_star_r <= d_star_c;
      dd_r     <= dd_hat;
      dh_r     <= dh_hat;
      dv_r     <= dv_hat;
      m4       <= m3;
    end
  end

  // ---------------- stage 5: CI ----------------
  rgb_t rgb_c;

  ci u_ci (
    .p(m4.p), .row_odd(m4.y[0]), .col_odd(m4.x[0]),
    .d_star(d_star_r), .dd_hat(dd_r), .dh_hat(dh_r), .dv_hat(dv_r),
    .rgb(rgb_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rgb   <= '0;
      out_x     <= '0;
      out_y     <= '0;
      out_type  <= EDGE_NONE;
    end else begin
      out_valid <= m4.valid;
      out_rgb   <= rgb_c;
      out_x     <= m4.x;
      out_y     <= m4.y;
      out_type  <= c_r;
    end
  end
endmodule
