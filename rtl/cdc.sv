// cdc: five-tap directional colour-difference unit (CDC).
//
// Along one direction (a row for horizontal, a column for vertical) it takes the
// centre sample c_c, its two nearest neighbours n_a, n_b (offsets -1, +1) and the
// two samples of the centre's own colour c_l, c_r (offsets -2, +2), and forms
//   A = (n_a + n_b) / 2            neighbour-colour estimate
//   B = (c_l + 2*c_c + c_r) / 4    centre-colour estimate, the average of the two
//                                  half-way estimates (c_l+c_c)/2 and (c_c+c_r)/2
// It returns the colour difference green minus chroma: A - B when the centre is red
// or blue (the document's equations (1) and (2)), and B - A when the centre is green,
// so that every difference in the window has the same sign convention.
// The ADD / shift / ADD / shift / SUB structure follows the document's CDC_1 figure;
// the sign select for green centres is this design's own generalisation.
// Combinational; the result lies in [-255, 255].
module cdc
  import eodm_pkg::*;
(
  input  pix_t  n_a,
  input  pix_t  n_b,
  input  pix_t  c_l,
  input  pix_t  c_c,
  input  pix_t  c_r,
  input  logic  centre_green,
  output diff_t d
);
  logic [8:0] nsum, csum, cc2;
  logic [9:0] btot;
  logic       nsum_co, csum_co, btot_co, sub_co;
  logic [8:0] a9, b9, minu, subt, dif;

  add_n #(.N(9)) u_add_n (.a({1'b0, n_a}), .b({1'b0, n_b}), .cin(1'b0), .sum(nsum), .cout(nsum_co));
  add_n #(.N(9)) u_add_c (.a({1'b0, c_l}), .b({1'b0, c_r}), .cin(1'b0), .sum(csum), .cout(csum_co));
  assign cc2 = {c_c, 1'b0};                       // MUL 2 (shifter)
  add_n #(.N(10)) u_add_b (.a({1'b0, csum}), .b({1'b0, cc2}), .cin(1'b0), .sum(btot), .cout(btot_co));

  assign a9 = {1'b0, nsum[8:1]};                  // DIV 2 (shifter)
  assign b9 = {1'b0, btot[9:2]};                  // DIV 4 (shifter)

  assign minu = centre_green ? b9 : a9;
  assign subt = centre_green ? a9 : b9;
  // SUB: minuend + ~subtrahend + 1
  add_n #(.N(9)) u_sub (.a(minu), .b(~subt), .cin(1'b1), .sum(dif), .cout(sub_co));

  assign d = diff_t'(dif);
endmodule
