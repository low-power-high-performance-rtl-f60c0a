// eodm_pkg: types and constants shared by the edge-oriented demosaicking (EODM) pipeline.
//
// Pixels are 8-bit unsigned CFA samples. Colour differences (green minus red or
// green minus blue) are 9-bit signed, edge strengths are 11-bit unsigned. The Bayer
// phase follows the 5x5 pattern of the reference figure: even rows are G R G R ...,
// odd rows are B G B G ..., counted from the first pixel of the frame (GRBG).
// Edge types use a 3-bit code: the two-bit codes of the published edge-type table
// (00, 01, 10, 11) in the low bits, and 3'b100 for "no edge", which is this
// design's own choice.
package eodm_pkg;

  localparam int unsigned PIX_W  = 8;   // CFA sample width
  localparam int unsigned DIFF_W = 9;   // signed colour-difference width
  localparam int unsigned EDGE_W = 11;  // unsigned edge-strength width

  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [DIFF_W-1:0] diff_t;
  typedef logic        [EDGE_W-1:0] edge_t;

  // Window geometry: 5 rows (i-2 .. i+2) by 7 columns (j-3 .. j+3)
  localparam int unsigned WIN_ROWS = 5;
  localparam int unsigned WIN_COLS = 7;

  typedef pix_t win_t [WIN_ROWS][WIN_COLS];

  // Edge type c
  typedef enum logic [2:0] {
    EDGE_H_NORMAL = 3'b000,
    EDGE_H_SLIGHT = 3'b001,
    EDGE_V_NORMAL = 3'b010,
    EDGE_V_SLIGHT = 3'b011,
    EDGE_NONE     = 3'b100
  } edge_type_e;

  // Colour of a CFA sample at (row, col) parity
  typedef enum logic [1:0] {CFA_R = 2'd0, CFA_G = 2'd1, CFA_B = 2'd2} cfa_colour_e;

  function automatic cfa_colour_e cfa_colour(input logic row_odd, input logic col_odd);
    if (row_odd == col_odd) return CFA_G;
    else if (!row_odd)      return CFA_R;
    else                    return CFA_B;
  endfunction

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  // Saturate a signed value to the 8-bit pixel range
  function automatic pix_t clip_pix(input logic signed [11:0] v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
