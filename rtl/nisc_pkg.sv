// nisc_pkg: shared types of the NISC (No-Instruction-Set Computer) processor.
//
// A NISC core has no instruction set. Every clock cycle the controller
// presents one wide control word, and each field of that word drives one
// multiplexer select, one unit opcode or one register enable in the data
// path directly. This package defines that control word (cw_t) and the
// enumerations of its fields for the data path used here: a two-read,
// two-write register file, a comparator with forwarding inputs, two ALUs,
// a multiplier, a 16-bit multi-cycle divider and a data memory.
//
// The set of units and the divider width follow the processor being
// modelled. The field layout, the encodings and the widths of the register
// and program addresses are this design's own choice: a NISC compiler
// would derive them from the architecture description.
package nisc_pkg;

  localparam int unsigned XLEN   = 32;  // data path word width
  localparam int unsigned RF_AW  = 5;   // register address width (32 registers)
  localparam int unsigned PC_W   = 10;  // program counter width (1024 control words)

  // ALU operations (used by both ALU and ALU2).
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,
    ALU_SUB   = 4'd1,
    ALU_SLL   = 4'd2,
    ALU_SRL   = 4'd3,
    ALU_SRA   = 4'd4,
    ALU_AND   = 4'd5,
    ALU_OR    = 4'd6,
    ALU_XOR   = 4'd7,
    ALU_NOR   = 4'd8,
    ALU_PASSB = 4'd9
  } alu_op_e;

  // Comparator operations; the result becomes the status bit.
  typedef enum logic [2:0] {
    CMP_EQ  = 3'd0,
    CMP_NE  = 3'd1,
    CMP_LT  = 3'd2,   // signed a <  b
    CMP_GE  = 3'd3,   // signed a >= b
    CMP_LTU = 3'd4,   // unsigned a <  b
    CMP_GEU = 3'd5    // unsigned a >= b
  } cmp_op_e;

  // Operand source of ALU, ALU2, multiplier, divider and memory address.
  typedef enum logic [1:0] {
    OP_B1  = 2'd0,   // bus 1 (register file read port 1)
    OP_B2  = 2'd1,   // bus 2 (register file read port 2)
    OP_IMM = 2'd2    // constant field of the control word
  } op_src_e;

  // Comparator operand source: buses, constant, or a forwarded unit output.
  typedef enum logic [3:0] {
    CS_B1   = 4'd0,
    CS_B2   = 4'd1,
    CS_IMM  = 4'd2,
    CS_ALU  = 4'd3,
    CS_ALU2 = 4'd4,
    CS_MUL  = 4'd5,
    CS_DIVQ = 4'd6,
    CS_DIVR = 4'd7,
    CS_MEM  = 4'd8
  } cmp_src_e;

  // Number of forwarded unit outputs seen by the comparator.
  localparam int unsigned N_FWD = 6;

  // Write-back source of a register file write port.
  typedef enum logic [2:0] {
    WB_ALU  = 3'd0,
    WB_ALU2 = 3'd1,
    WB_MUL  = 3'd2,
    WB_DIVQ = 3'd3,
    WB_DIVR = 3'd4,
    WB_MEM  = 3'd5,
    WB_IMM  = 3'd6
  } wb_src_e;

  // Data memory address source.
  typedef enum logic [2:0] {
    MA_B1   = 3'd0,
    MA_B2   = 3'd1,
    MA_IMM  = 3'd2,
    MA_ALU  = 3'd3,
    MA_ALU2 = 3'd4
  } mem_addr_src_e;

  // Next control word selection in the controller.
  typedef enum logic [2:0] {
    NX_INC  = 3'd0,  // PC + 1
    NX_JMP  = 3'd1,  // PC + offset
    NX_BRT  = 3'd2,  // PC + offset if status = 1, else PC + 1
    NX_BRF  = 3'd3,  // PC + offset if status = 0, else PC + 1
    NX_ADDR = 3'd4,  // address from the data path (bus 1), used for returns
    NX_HALT = 3'd5   // stop; nothing else in this word takes effect
  } next_e;

  typedef struct packed {
    // controller
    next_e                    nxt;
    logic signed [PC_W-1:0]   offset;
    logic                     wait_div;  // hold this word until the divider is idle
    // constant
    logic [XLEN-1:0]          imm;
    // register file
    logic [RF_AW-1:0]         ra1;
    logic [RF_AW-1:0]         ra2;
    logic                     we0;
    logic [RF_AW-1:0]         wa0;
    wb_src_e                  wb0;
    logic                     we1;
    logic [RF_AW-1:0]         wa1;
    wb_src_e                  wb1;
    // ALU
    logic                     alu_en;
    alu_op_e                  alu_op;
    op_src_e                  alu_a;
    op_src_e                  alu_b;
    // ALU2
    logic                     alu2_en;
    alu_op_e                  alu2_op;
    op_src_e                  alu2_a;
    op_src_e                  alu2_b;
    // multiplier
    logic                     mul_en;
    op_src_e                  mul_a;
    op_src_e                  mul_b;
    // divider
    logic                     div_start;
    op_src_e                  div_a;
    op_src_e                  div_b;
    // comparator
    logic                     cmp_en;
    cmp_op_e                  cmp_op;
    cmp_src_e                 cmp_a;
    cmp_src_e                 cmp_b;
    // data memory (write data is always bus 2)
    logic                     mem_re;
    logic                     mem_we;
    mem_addr_src_e            mem_addr;
  } cw_t;


endpackage
