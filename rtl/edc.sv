// edc: estimated difference calculator (EDC) with its output multiplexer.
//
// From the weighted horizontal and vertical colour differences it forms the five
// candidate differences, one per edge type:
//   normal horizontal  Dh
//   slight horizontal  (3*Dh + Dv) / 4
//   normal vertical    Dv
//   slight vertical    (Dh + 3*Dv) / 4
//   no edge            (Dh + Dv) / 2
// and the multiplexer passes the one chosen by the edge type c as d_star. The
// document names five candidates chosen by the edge type; the 3:1 and 1:1 blends
// are this design's own (adders and shifts only, arithmetic shift = floor).
// Combinational.
module edc
  import eodm_pkg::*;
(
  input  diff_t      dh,
  input  diff_t      dv,
  input  edge_type_e c,
  output diff_t      cand [5],
  output diff_t      d_star
);
  logic signed [DIFF_W+2:0] h, v;

  always_comb begin
    h = (DIFF_W+3)'(dh);
    v = (DIFF_W+3)'(dv);
    cand[0] = dh;
    cand[1] = diff_t'(((h <<< 1) + h + v) >>> 2);
    cand[2] = dv;
    cand[3] = diff_t'(((v <<< 1) + v + h) >>> 2);
    cand[4] = diff_t'((h + v) >>> 1);
    unique case (c)
      EDGE_H_NORMAL: d_star = cand[0];
      EDGE_H_SLIGHT: d_star = cand[1];
      EDGE_V_NORMAL: d_star = cand[2];
      EDGE_V_SLIGHT: d_star = cand[3];
      default:       d_star = cand[4];
    endcase
  end
endmodule
