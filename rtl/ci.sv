// ci: colour interpolators CI_1, CI_2 and CI_3, producing the full RGB pixel.
//
// All colour differences are green minus chroma.
//   CI_1 (case 1, centre red or blue): G = P + d_star, the edge-selected difference.
//   CI_2 (case 2, centre red or blue): the opposite chroma = G - dd_hat, where dd_hat
//        is the mean difference at the four diagonal neighbours.
//   CI_3 (case 3, centre green): the chroma of the centre's row = P - dh_hat and the
//        chroma of its column = P - dv_hat.
// Results are clipped to 0..255 and routed to R, G, B by the Bayer phase: on even
// rows the row chroma is red, on odd rows blue. The three cases are the document's;
// the formulas are this design's own reading of its colour-difference method.
// Combinational.
module ci
  import eodm_pkg::*;
(
  input  pix_t  p,
  input  logic  row_odd,
  input  logic  col_odd,
  input  diff_t d_star,
  input  diff_t dd_hat,
  input  diff_t dh_hat,
  input  diff_t dv_hat,
  output rgb_t  rgb
);
  pix_t g1, x2, ch3, cv3;

  always_comb begin
    // CI_1
    g1  = clip_pix(12'(signed'({4'b0, p})) + 12'(d_star));
    // CI_2
    x2  = clip_pix(12'(signed'({4'b0, g1})) - 12'(dd_hat));
    // CI_3
    ch3 = clip_pix(12'(signed'({4'b0, p})) - 12'(dh_hat));
    cv3 = clip_pix(12'(signed'({4'b0, p})) - 12'(dv_hat));

    unique case (cfa_colour(row_odd, col_odd))
      CFA_R:   rgb = '{r: p,   g: g1, b: x2};
      CFA_B:   rgb = '{r: x2,  g: g1, b: p};
      default: rgb = row_odd ? '{r: cv3, g: p, b: ch3} : '{r: ch3, g: p, b: cv3};
    endcase
  end
endmodule
