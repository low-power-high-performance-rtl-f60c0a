// line_buffer: four SRAM line buffers that turn a raster CFA stream into columns of
// five vertically adjacent samples (rows y-4 .. y, where y is the incoming row).
//
// Each accepted pixel (in_valid) reads the word at its column from all four SRAMs and,
// in the same cycle, overwrites the oldest line (the SRAM selected by y mod 4) with
// the new pixel. The buffers therefore rotate: a line is written once and never
// copied. Four read multiplexers put the SRAM outputs in row order and four write
// enables pick the SRAM to write, eight multiplexers in all, in line with the
// document's five scan lines built from four line buffers with multiplexers. The
// rotating scheme is this design's reading of that sentence.
//
// Position: in_sof marks the first pixel of a frame; otherwise pixels are counted in
// raster order over IMG_W x IMG_H. Timing: out_valid, out_col, out_x and out_y follow
// the accepted pixel by exactly one clock. out_col[0] is the oldest row (y-4),
// out_col[4] is the incoming pixel. Rows of out_col that lie before the frame start
// hold stale data; the consumer masks them using out_y.
module line_buffer
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
  output pix_t          out_col [WIN_ROWS],
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);
  localparam int unsigned NLB = WIN_ROWS - 1;  // four line buffers

  logic [XW-1:0] x_cnt, pos_x;
  logic [YW-1:0] y_cnt, pos_y;
  logic [1:0]    sel_d;
  pix_t          pix_d;
  pix_t          q [NLB];

  assign pos_x = in_sof ? '0 : x_cnt;
  assign pos_y = in_sof ? '0 : y_cnt;

  // raster position counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt <= '0;
      y_cnt <= '0;
    end else if (in_valid) begin
      if (32'(pos_x) == IMG_W - 1) begin
        x_cnt <= '0;
        y_cnt <= (32'(pos_y) == IMG_H - 1) ? '0 : pos_y + 1'b1;
      end else begin
        x_cnt <= pos_x + 1'b1;
        y_cnt <= pos_y;
      end
    end
  end

  for (genvar k = 0; k < NLB; k++) begin : g_lb
    line_sram #(.DEPTH(IMG_W), .WIDTH(PIX_W)) u_sram (
      .clk  (clk),
      .en   (in_valid),
      .we   (in_valid && (pos_y[1:0] == 2'(k))),
      .addr (pos_x),
      .wdata(in_pix),
      .rdata(q[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      sel_d     <= '0;
      pix_d     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_x <= pos_x;
        out_y <= pos_y;
        sel_d <= pos_y[1:0];
        pix_d <= in_pix;
      end
    end
  end

  // read multiplexers: SRAM (y+k) mod 4 holds row y-4+k
  always_comb begin
    for (int k = 0; k < NLB; k++) out_col[k] = q[2'(sel_d + 2'(k))];
    out_col[NLB] = pix_d;
  end
endmodule
