// nisc_comparator: branch comparator of the NISC data path.
//
// Each operand has its own multiplexer choosing bus 1, bus 2, the control
// word constant, or one of the forwarded unit output registers (ALU, ALU2,
// multiplier, divider quotient, divider remainder, memory read). Forwarding
// lets a branch test a value in the cycle right after a unit produced it,
// without a write-back to the register file and a read from it. The
// comparison (equal, not equal, signed or unsigned less-than or
// greater-or-equal) is combinational; the data path latches the result in
// the status register that the controller branches on.
//
// The forwarding paths to the comparator follow the processor's final
// architecture; the comparison set and encodings are this design's choices.
module nisc_comparator
  import nisc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  cmp_op_e          op,
  input  cmp_src_e         a_sel,
  input  cmp_src_e         b_sel,
  input  logic [WIDTH-1:0] bus1,
  input  logic [WIDTH-1:0] bus2,
  input  logic [WIDTH-1:0] imm,
  // forwarded outputs, indexed by cmp_src_e - CS_ALU
  input  logic [WIDTH-1:0] fwd [N_FWD],
  output logic             result
);

  function automatic logic [WIDTH-1:0] pick(cmp_src_e s, logic [WIDTH-1:0] b1,
                                            logic [WIDTH-1:0] b2, logic [WIDTH-1:0] k,
                                            logic [WIDTH-1:0] f [N_FWD]);
    case (s)
      CS_B1:   return b1;
      CS_B2:   return b2;
      CS_IMM:  return k;
      CS_ALU:  return f[0];
      CS_ALU2: return f[1];
      CS_MUL:  return f[2];
      CS_DIVQ: return f[3];
      CS_DIVR: return f[4];
      CS_MEM:  return f[5];
      default: return '0;
    endcase
  endfunction

  logic [WIDTH-1:0] a, b;
  assign a = pick(a_sel, bus1, bus2, imm, fwd);
  assign b = pick(b_sel, bus1, bus2, imm, fwd);

  always_comb begin
    unique case (op)
      CMP_EQ:  result = (a == b);
      CMP_NE:  result = (a != b);
      CMP_LT:  result = ($signed(a) <  $signed(b));
      CMP_GE:  result = ($signed(a) >= $signed(b));
      CMP_LTU: result = (a <  b);
      CMP_GEU: result = (a >= b);
      default: result = 1'b0;
    endcase
  end

endmodule
