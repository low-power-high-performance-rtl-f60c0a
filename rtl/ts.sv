// ts: type select (TS), classifies the local edge from the two edge strengths.
//
// With Eh the horizontal and Ev the vertical weighted edge strength, the first rule
// that holds gives the type:
//   4*Eh <= Ev              normal horizontal edge   3'b000
//   2*Eh <= Ev (< 4*Eh)     slight horizontal edge   3'b001
//   4*Ev <= Eh              normal vertical edge     3'b010
//   2*Ev <= Eh (< 4*Ev)     slight vertical edge     3'b011
//   otherwise               no edge                  3'b100
// The five types, their two-bit codes and the 2x / 4x ratio thresholds follow the
// document's edge-type table; testing the rules in table order and the three-bit
// "no edge" code are this design's own. Only shifts and comparators.
// Combinational.
module ts
  import eodm_pkg::*;
(
  input  edge_t      e_h,
  input  edge_t      e_v,
  output edge_type_e c
);
  logic [EDGE_W+1:0] h1, h2, h4, v1, v2, v4;

  always_comb begin
    h1 = (EDGE_W+2)'(e_h);
    v1 = (EDGE_W+2)'(e_v);
    h2 = h1 << 1;
    h4 = h1 << 2;
    v2 = v1 << 1;
    v4 = v1 << 2;
    if (h4 <= v1)      c = EDGE_H_NORMAL;
    else if (h2 <= v1) c = EDGE_H_SLIGHT;
    else if (v4 <= h1) c = EDGE_V_NORMAL;
    else if (v2 <= h1) c = EDGE_V_SLIGHT;
    else               c = EDGE_NONE;
  end
endmodule
