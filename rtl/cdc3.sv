// cdc3: three-tap colour-difference unit.
//
// Takes a sample x and its two neighbours a, b on either side along one direction,
// where the neighbours are of the other kind (green around a chroma sample, or
// chroma around a green sample). It returns green minus chroma:
//   (a + b)/2 - x   when x is red or blue
//   x - (a + b)/2   when x is green
// The averaging of two directional neighbours is the document's estimate
// R(i,j-1) = (R(i,j-2) + R(i,j)) / 2. It is used where the five-tap unit would need
// samples outside the 5 x 7 window, and for the diagonal differences; those uses are
// this design's own choice. Combinational; the result lies in [-255, 255].
module cdc3
  import eodm_pkg::*;
(
  input  pix_t  a,
  input  pix_t  b,
  input  pix_t  x,
  input  logic  x_green,
  output diff_t d
);
  logic [8:0] nsum;
  logic       nsum_co, sub_co;
  logic [8:0] avg9, x9, minu, subt, dif;

  add_n #(.N(9)) u_add (.a({1'b0, a}), .b({1'b0, b}), .cin(1'b0), .sum(nsum), .cout(nsum_co));
  assign avg9 = {1'b0, nsum[8:1]};
  assign x9   = {1'b0, x};
  assign minu = x_green ? x9 : avg9;
  assign subt = x_green ? avg9 : x9;
  add_n #(.N(9)) u_sub (.a(minu), .b(~subt), .cin(1'b1), .sum(dif), .cout(sub_co));

  assign d = diff_t'(dif);
endmodule
