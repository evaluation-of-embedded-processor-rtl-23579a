// nisc_pmem: control-word memory of the NISC controller.
//
// Holds one control word (nisc_pkg::cw_t) per address. The read is
// synchronous: the controller presents the address of the next word and the
// word appears on rdata after the clock edge, as in a block RAM. A load port
// writes words while the processor is stopped. The array starts at zero,
// which decodes as "advance to the next word, do nothing".
//
// The memory of control words follows the processor; depth, synchronous
// read and the load port are this design's choices.
module nisc_pmem
  import nisc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output cw_t           rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cw_t           wdata
);

  cw_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
