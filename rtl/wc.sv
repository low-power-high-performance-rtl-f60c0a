// wc: weighted calculator (WC), the 3 x 3 weighted average of colour differences.
//
//   out = (4*centre + 2*(e0+e1+e2+e3) + (k0+k1+k2+k3)) / 16
// where e* are the four side neighbours and k* the four corner neighbours of the
// 3 x 3 set of directional differences. The weights 4 / 2 / 1 and the final divide
// by 16 (shifts) follow the document's WC_1 figure. Division is an arithmetic shift
// right, i.e. rounding towards minus infinity (this design's choice). Combinational.
module wc
  import eodm_pkg::*;
(
  input  diff_t centre,
  input  diff_t side   [4],
  input  diff_t corner [4],
  output diff_t d_hat
);
  logic signed [DIFF_W+4:0] side_sum, corner_sum, total;

  always_comb begin
    side_sum   = '0;
    corner_sum = '0;
    for (int k = 0; k < 4; k++) begin
      side_sum   += (DIFF_W+5)'(side[k]);
      corner_sum += (DIFF_W+5)'(corner[k]);
    end
    total = ((DIFF_W+5)'(centre) <<< 2) + (side_sum <<< 1) + corner_sum;
    d_hat = diff_t'(total >>> 4);
  end
endmodule
