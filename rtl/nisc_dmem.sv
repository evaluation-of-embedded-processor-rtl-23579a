// nisc_dmem: data memory of the NISC processor.
//
// A word-addressed dual-port RAM. Port A belongs to the data path: a write
// stores wdata at addr on the clock edge; a read (re) loads the word at addr
// into rdata on the clock edge, so rdata doubles as the memory unit's output
// register and holds its value until the next read. Port B is a host port
// with the same synchronous timing, used to place input data and read
// results while the processor is halted. Both ports writing the same word in
// one cycle leaves port A's value. The array starts at zero.
//
// The memory and its single data path port follow the processor; the host
// port, the depth and the zero start are this design's choices.
module nisc_dmem #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // data path port
  input  logic             re,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  // host port
  input  logic             host_we,
  input  logic [AW-1:0]    host_addr,
  input  logic [WIDTH-1:0] host_wdata,
  output logic [WIDTH-1:0] host_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    if (we)      mem[addr]      <= wdata;
    if (re)      rdata          <= mem[addr];
    host_rdata <= mem[host_addr];
  end

endmodule
