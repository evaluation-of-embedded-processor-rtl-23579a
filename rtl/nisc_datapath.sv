// nisc_datapath: data path of the customised NISC processor.
//
// Units: a register file with two read buses (B1, B2) and two write ports;
// a comparator whose operands can also be taken straight from every unit's
// output register (forwarding); two ALUs (ALU and ALU2); a multiplier; a
// DIV_W-bit multi-cycle divider; and a data memory. Every field of the
// control word drives one select or enable here; nothing is decoded.
//
// Operation: in the cycle a control word is executed (exec = 1), the
// register file is read onto B1 and B2; ALU, ALU2, multiplier and divider
// take each operand from B1, B2 or the control word constant; an enabled
// unit captures its result in its own output register on the clock edge.
// A following control word writes those output registers back to the
// register file (two ports), compares them, or uses ALU/ALU2 outputs as a
// memory address. Memory writes store B2. The comparator result is captured
// in the status register, which the controller tests for branches. B1 is
// also sent to the controller as a jump address.
//
// Timing: unit results are available one cycle after their operands, the
// memory read likewise, the divider DIV_W cycles after its start. Output
// registers hold their value until the unit is enabled again.
// The controller fields of the control word (nxt, offset, wait_div) are
// not read here, and a memory address keeps only its low log2(DMEM_DEPTH)
// bits, so a wider address wraps around the memory.
//
// The unit set, the output register after each unit, the second ALU, the
// comparator forwarding and the 16-bit divider follow the processor's final
// data path. The operand multiplexer choices, the second write port and the
// memory addressing are this design's choices.
module nisc_datapath
  import nisc_pkg::*;
#(
  parameter int unsigned DIV_W      = 16,
  parameter int unsigned DMEM_DEPTH = 4096,
  localparam int unsigned DAW       = $clog2(DMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cw_t             cw,
  input  logic            exec,
  output logic            status,
  output logic [XLEN-1:0] address,
  output logic            div_busy,
  // data memory host port
  input  logic            host_we,
  input  logic [DAW-1:0]  host_addr,
  input  logic [XLEN-1:0] host_wdata,
  output logic [XLEN-1:0] host_rdata
);

  logic [XLEN-1:0] bus1, bus2;
  logic [XLEN-1:0] alu_y, alu2_y, mul_y, cmp_fwd [N_FWD];
  logic [XLEN-1:0] alu_q, alu2_q, mul_q, divq_q, divr_q, mem_q;
  logic [XLEN-1:0] wd0, wd1, mem_addr_full;
  logic            cmp_y;

  function automatic logic [XLEN-1:0] opsel(op_src_e s, logic [XLEN-1:0] b1,
                                            logic [XLEN-1:0] b2, logic [XLEN-1:0] k);
    case (s)
      OP_B1:   return b1;
      OP_B2:   return b2;
      OP_IMM:  return k;
      default: return '0;
    endcase
  endfunction

  function automatic logic [XLEN-1:0] wbsel(wb_src_e s, logic [XLEN-1:0] k,
      logic [XLEN-1:0] a0, logic [XLEN-1:0] a1, logic [XLEN-1:0] m,
      logic [XLEN-1:0] q, logic [XLEN-1:0] r, logic [XLEN-1:0] d);
    case (s)
      WB_ALU:  return a0;
      WB_ALU2: return a1;
      WB_MUL:  return m;
      WB_DIVQ: return q;
      WB_DIVR: return r;
      WB_MEM:  return d;
      WB_IMM:  return k;
      default: return '0;
    endcase
  endfunction

  // ---------------------------------------------------------------- RF
  assign wd0 = wbsel(cw.wb0, cw.imm, alu_q, alu2_q, mul_q, divq_q, divr_q, mem_q);
  assign wd1 = wbsel(cw.wb1, cw.imm, alu_q, alu2_q, mul_q, divq_q, divr_q, mem_q);

  nisc_regfile #(.DEPTH(1 << RF_AW), .WIDTH(XLEN)) u_rf (
    .clk (clk), .rst_n (rst_n),
    .ra1 (cw.ra1), .rd1 (bus1),
    .ra2 (cw.ra2), .rd2 (bus2),
    .we0 (exec && cw.we0), .wa0 (cw.wa0), .wd0 (wd0),
    .we1 (exec && cw.we1), .wa1 (cw.wa1), .wd1 (wd1)
  );

  assign address = bus1;

  // ---------------------------------------------------------- ALU, ALU2
  nisc_alu #(.WIDTH(XLEN)) u_alu (
    .op (cw.alu_op),
    .a  (opsel(cw.alu_a, bus1, bus2, cw.imm)),
    .b  (opsel(cw.alu_b, bus1, bus2, cw.imm)),
    .y  (alu_y)
  );

  nisc_alu #(.WIDTH(XLEN)) u_alu2 (
    .op (cw.alu2_op),
    .a  (opsel(cw.alu2_a, bus1, bus2, cw.imm)),
    .b  (opsel(cw.alu2_b, bus1, bus2, cw.imm)),
    .y  (alu2_y)
  );

  // -------------------------------------------------------- multiplier
  nisc_multiplier #(.WIDTH(XLEN)) u_mul (
    .a (opsel(cw.mul_a, bus1, bus2, cw.imm)),
    .b (opsel(cw.mul_b, bus1, bus2, cw.imm)),
    .y (mul_y)
  );

  // ----------------------------------------------------------- divider
  nisc_divider #(.WIDTH(XLEN), .DIV_W(DIV_W)) u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (exec && cw.div_start),
    .dividend  (opsel(cw.div_a, bus1, bus2, cw.imm)),
    .divisor   (opsel(cw.div_b, bus1, bus2, cw.imm)),
    .busy      (div_busy),
    .quotient  (divq_q),
    .remainder (divr_q)
  );

  // ------------------------------------------------------- data memory
  always_comb begin
    unique case (cw.mem_addr)
      MA_B1:   mem_addr_full = bus1;
      MA_B2:   mem_addr_full = bus2;
      MA_IMM:  mem_addr_full = cw.imm;
      MA_ALU:  mem_addr_full = alu_q;
      MA_ALU2: mem_addr_full = alu2_q;
      default: mem_addr_full = '0;
    endcase
  end

  nisc_dmem #(.DEPTH(DMEM_DEPTH), .WIDTH(XLEN)) u_dmem (
    .clk        (clk),
    .re         (exec && cw.mem_re),
    .we         (exec && cw.mem_we),
    .addr       (mem_addr_full[DAW-1:0]),
    .wdata      (bus2),
    .rdata      (mem_q),
    .host_we    (host_we),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .host_rdata (host_rdata)
  );

  // -------------------------------------------------------- comparator
  assign cmp_fwd[0] = alu_q;
  assign cmp_fwd[1] = alu2_q;
  assign cmp_fwd[2] = mul_q;
  assign cmp_fwd[3] = divq_q;
  assign cmp_fwd[4] = divr_q;
  assign cmp_fwd[5] = mem_q;

  nisc_comparator #(.WIDTH(XLEN)) u_cmp (
    .op     (cw.cmp_op),
    .a_sel  (cw.cmp_a),
    .b_sel  (cw.cmp_b),
    .bus1   (bus1),
    .bus2   (bus2),
    .imm    (cw.imm),
    .fwd    (cmp_fwd),
    .result (cmp_y)
  );

  // ---------------------------------------------- unit output registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alu_q  <= '0;
      alu2_q <= '0;
      mul_q  <= '0;
      status <= 1'b0;
    end else if (exec) begin
      if (cw.alu_en)  alu_q  <= alu_y;
      if (cw.alu2_en) alu2_q <= alu2_y;
      if (cw.mul_en)  mul_q  <= mul_y;
      if (cw.cmp_en)  status <= cmp_y;
    end
  end

endmodule
