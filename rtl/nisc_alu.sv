// nisc_alu: combinational arithmetic-logic unit of the NISC data path.
//
// Performs addition, subtraction, logical and arithmetic shifts and the
// bitwise logic operations, selected by op (nisc_pkg::alu_op_e). Shifts use
// the low log2(WIDTH) bits of b. PASSB forwards b, used to load constants.
// The processor carries two instances, ALU and ALU2; the second lets stack
// and frame pointer arithmetic run beside the main computation.
//
// The operation classes follow the processor description; the exact list,
// the encoding and the PASSB operation are this design's choices. The
// result is registered outside, in the data path's output register.
module nisc_alu
  import nisc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  localparam int unsigned SW = $clog2(WIDTH);
  logic [SW-1:0] sh;
  assign sh = b[SW-1:0];

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << sh;
      ALU_SRL:   y = a >> sh;
      ALU_SRA:   y = $signed(a) >>> sh;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOR:   y = ~(a | b);
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end

endmodule
