// add_n: N-bit ripple-carry full adder, the basic adder of the arithmetic units.
//
// sum = a + b + cin over N bits, with the carry out on cout. A subtractor is the
// same adder with b inverted and cin = 1 (two's complement), which is how the
// colour-difference units use it. Purely combinational, no clock.
// The document lists adders of 8 to 11 bits and an n-bit full adder among the basic
// parts; the ripple-carry structure is this design's own choice.
module add_n #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] carry;

  assign carry[0] = cin;
  for (genvar k = 0; k < N; k++) begin : g_fa
    assign sum[k]       = a[k] ^ b[k] ^ carry[k];
    assign carry[k + 1] = (a[k] & b[k]) | (a[k] & carry[k]) | (b[k] & carry[k]);
  end
  assign cout = carry[N];
endmodule
