// nisc_regfile: general-purpose register file of the NISC data path.
//
// Two combinational read ports drive the data path's two buses (B1, B2);
// two synchronous write ports take results from the unit output registers,
// so that ALU and ALU2 can both write back in the same cycle. If both write
// ports address the same register in one cycle, port 1 wins. A synchronous
// active-low reset clears every register.
//
// The two read buses follow the processor's data path drawing; the register
// count, the second write port and the reset are this design's choices.
module nisc_regfile #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd2,
  input  logic             we0,
  input  logic [AW-1:0]    wa0,
  input  logic [WIDTH-1:0] wd0,
  input  logic             we1,
  input  logic [AW-1:0]    wa1,
  input  logic [WIDTH-1:0] wd1
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else begin
      if (we0) regs[wa0] <= wd0;
      if (we1) regs[wa1] <= wd1;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

endmodule
