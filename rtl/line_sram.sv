// line_sram: one line-buffer memory, DEPTH words of WIDTH bits (one image line).
//
// Single-port synchronous SRAM with read-first behaviour: when en is high the word
// at addr appears on rdata after the clock edge, and when we is also high the same
// edge writes wdata to addr after the old word has been read. rdata holds its value
// while en is low. Contents are not reset. The document stores each line of 768 x 8
// bits in an SRAM; the read-first single port is this design's own choice.
module line_sram #(
  parameter int unsigned DEPTH = 768,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end
endmodule
