// edd: edge-strength detector along one direction (EDD_1 horizontal, EDD_2 vertical).
//
// Input: a 3 x 3 set of directional colour differences arranged as three parallel
// lines, d[l][0..2] being consecutive positions along the detection direction; line 1
// passes through the centre pixel. The edge of each line is the total variation of the
// differences along it, E_l = |d[l][0]-d[l][1]| + |d[l][1]-d[l][2]|, and the output is
// the weighted mean of the centre line and its two neighbours,
//   e_hat = (E_0 + 2*E_1 + E_2) / 4.
// The document says the edge detector uses the colour differences of the previous
// stage and a weighted average of the edges of the centre pixel and its two nearest
// neighbours; the exact measure and the 1/2/1 weights are this design's own choice.
// Combinational; e_hat is at most 1020.
module edd
  import eodm_pkg::*;
(
  input  diff_t d [3][3],
  output edge_t e_hat
);
  function automatic logic [DIFF_W:0] absdiff(input diff_t p, input diff_t q);
    logic signed [DIFF_W:0] t;
    t = (DIFF_W+1)'(p) - (DIFF_W+1)'(q);
    return (t < 0) ? -t : t;
  endfunction

  logic [EDGE_W-1:0] e_line [3];
  logic [EDGE_W+1:0] tot;

  always_comb begin
    for (int l = 0; l < 3; l++)
      e_line[l] = EDGE_W'(absdiff(d[l][0], d[l][1])) + EDGE_W'(absdiff(d[l][1], d[l][2]));
    tot   = (EDGE_W+2)'(e_line[0]) + ((EDGE_W+2)'(e_line[1]) << 1) + (EDGE_W+2)'(e_line[2]);
    e_hat = EDGE_W'(tot >> 2);
  end
endmodule
