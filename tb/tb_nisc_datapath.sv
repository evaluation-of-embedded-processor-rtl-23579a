// tb_nisc_datapath: drives the data path with random control words and
// compares it with a cycle-level reference model of the same data path:
// register file, unit output registers, divider timing, data memory and
// status register. Register contents are read back through the address
// output (bus 1) with exec low, memory through the host port. Also counts
// how often the comparator used a forwarded operand, both ALUs worked in
// the same cycle and both write ports wrote in the same cycle.
module tb_nisc_datapath;
  import nisc_pkg::*;
  localparam int DIV_W = 16;
  localparam int DMEM  = 4096;

  logic            clk = 0, rst_n = 0, exec = 0, status, div_busy;
  logic            host_we = 0;
  logic [11:0]     host_addr = 0;
  logic [XLEN-1:0] host_wdata = 0, host_rdata, address;
  cw_t             cw;

  nisc_datapath #(.DIV_W(DIV_W), .DMEM_DEPTH(DMEM)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [31:0] rf [32];
  logic [31:0] mem [DMEM];
  logic [31:0] q_alu, q_alu2, q_mul, q_dq, q_dr, q_mem;
  logic        m_status;
  int          div_cnt;
  logic [15:0] div_x, div_d;
  int n_fwd = 0, n_par = 0, n_dual = 0, n_div = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  function automatic logic [31:0] f_alu(alu_op_e o, logic [31:0] a, logic [31:0] b);
    case (o)
      ALU_ADD: return a + b;
      ALU_SUB: return a - b;
      ALU_SLL: return a << b[4:0];
      ALU_SRL: return a >> b[4:0];
      ALU_SRA: return 32'($signed(a) >>> b[4:0]);
      ALU_AND: return a & b;
      ALU_OR:  return a | b;
      ALU_XOR: return a ^ b;
      ALU_NOR: return ~(a | b);
      default: return b;
    endcase
  endfunction

  function automatic logic [31:0] f_op(op_src_e s, logic [31:0] b1, logic [31:0] b2, logic [31:0] k);
    return (s == OP_B1) ? b1 : (s == OP_B2) ? b2 : k;
  endfunction

  function automatic logic [31:0] f_cs(cmp_src_e s, logic [31:0] b1, logic [31:0] b2, logic [31:0] k);
    case (s)
      CS_B1: return b1;   CS_B2: return b2;     CS_IMM: return k;
      CS_ALU: return q_alu; CS_ALU2: return q_alu2; CS_MUL: return q_mul;
      CS_DIVQ: return q_dq; CS_DIVR: return q_dr;  default: return q_mem;
    endcase
  endfunction

  function automatic logic [31:0] f_wb(wb_src_e s, logic [31:0] k);
    case (s)
      WB_ALU: return q_alu;  WB_ALU2: return q_alu2; WB_MUL: return q_mul;
      WB_DIVQ: return q_dq;  WB_DIVR: return q_dr;   WB_MEM: return q_mem;
      default: return k;
    endcase
  endfunction

  function automatic logic f_cmp(cmp_op_e o, logic [31:0] a, logic [31:0] b);
    case (o)
      CMP_EQ: return a == b;   CMP_NE: return a != b;
      CMP_LT: return $signed(a) < $signed(b);  CMP_GE: return $signed(a) >= $signed(b);
      CMP_LTU: return a < b;   default: return a >= b;
    endcase
  endfunction

  function automatic cw_t rand_cw(logic allow_div);
    cw_t c;
    for (int b = 0; b < $bits(cw_t); b++) c[b] = 1'($urandom);
    c.alu_op  = alu_op_e'($urandom % 10);  c.alu2_op = alu_op_e'($urandom % 10);
    c.alu_a   = op_src_e'($urandom % 3);   c.alu_b   = op_src_e'($urandom % 3);
    c.alu2_a  = op_src_e'($urandom % 3);   c.alu2_b  = op_src_e'($urandom % 3);
    c.mul_a   = op_src_e'($urandom % 3);   c.mul_b   = op_src_e'($urandom % 3);
    c.div_a   = op_src_e'($urandom % 3);   c.div_b   = op_src_e'($urandom % 3);
    c.cmp_op  = cmp_op_e'($urandom % 6);
    c.cmp_a   = cmp_src_e'($urandom % 9);  c.cmp_b   = cmp_src_e'($urandom % 9);
    c.wb0     = wb_src_e'($urandom % 7);   c.wb1     = wb_src_e'($urandom % 7);
    c.mem_addr = mem_addr_src_e'($urandom % 5);
    c.div_start = allow_div && ($urandom % 4 == 0);
    if ($urandom % 2 != 0) c.imm = $urandom % 64;
    return c;
  endfunction

  task automatic step(cw_t c, logic ex);
    logic [31:0] b1, b2, a_mem, wd0, wd1, rd_mem;
    logic [31:0] n_alu, n_alu2, n_mul, n_dq, n_dr;
    logic        n_st;
    @(negedge clk);
    cw = c; exec = ex;
    #1;
    expect_eq("div_busy", int'(div_busy), int'(div_cnt > 0));
    b1 = rf[c.ra1]; b2 = rf[c.ra2];
    expect_eq("address", int'(address), int'(b1));
    n_alu = q_alu; n_alu2 = q_alu2; n_mul = q_mul; n_dq = q_dq; n_dr = q_dr; n_st = m_status;
    // divider progress
    if (div_cnt > 0) begin
      div_cnt--;
      if (div_cnt == 0) begin
        n_dq = (div_d == 0) ? 32'hFFFF : 32'(div_x / div_d);
        n_dr = (div_d == 0) ? 32'(div_x) : 32'(div_x % div_d);
      end
    end
    if (ex) begin
      if (c.alu_en)  n_alu  = f_alu(c.alu_op,  f_op(c.alu_a, b1, b2, c.imm),  f_op(c.alu_b, b1, b2, c.imm));
      if (c.alu2_en) n_alu2 = f_alu(c.alu2_op, f_op(c.alu2_a, b1, b2, c.imm), f_op(c.alu2_b, b1, b2, c.imm));
      if (c.mul_en)  n_mul  = f_op(c.mul_a, b1, b2, c.imm) * f_op(c.mul_b, b1, b2, c.imm);
      if (c.cmp_en)  n_st   = f_cmp(c.cmp_op, f_cs(c.cmp_a, b1, b2, c.imm), f_cs(c.cmp_b, b1, b2, c.imm));
      if (c.cmp_en && (c.cmp_a >= CS_ALU || c.cmp_b >= CS_ALU)) n_fwd++;
      if (c.alu_en && c.alu2_en) n_par++;
      if (c.we0 && c.we1) n_dual++;
      if (c.div_start) begin
        div_x = 16'(f_op(c.div_a, b1, b2, c.imm));
        div_d = 16'(f_op(c.div_b, b1, b2, c.imm));
        div_cnt = DIV_W;
        n_div++;
      end
      case (c.mem_addr)
        MA_B1: a_mem = b1;  MA_B2: a_mem = b2;  MA_IMM: a_mem = c.imm;
        MA_ALU: a_mem = q_alu;  default: a_mem = q_alu2;
      endcase
      rd_mem = mem[a_mem[11:0]];
      wd0 = f_wb(c.wb0, c.imm); wd1 = f_wb(c.wb1, c.imm);
      if (c.we0) rf[c.wa0] = wd0;
      if (c.we1) rf[c.wa1] = wd1;
      if (c.mem_we) mem[a_mem[11:0]] = b2;
      if (c.mem_re) q_mem = rd_mem;
    end
    q_alu = n_alu; q_alu2 = n_alu2; q_mul = n_mul; q_dq = n_dq; q_dr = n_dr; m_status = n_st;
    @(posedge clk); #1;
    expect_eq("status", int'(status), int'(m_status));
  endtask

  task automatic scan_rf();
    cw_t c;
    c = '0;
    for (int r = 0; r < 32; r++) begin
      c.ra1 = 5'(r);
      step(c, 1'b0);
    end
  endtask

  task automatic scan_mem(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); host_addr = 12'($urandom % 64);
      @(posedge clk); #1;
      expect_eq("host read", int'(host_rdata), int'(mem[host_addr]));
    end
  endtask

  initial begin
    cw = '0;
    for (int i = 0; i < 32; i++) rf[i] = '0;
    for (int i = 0; i < DMEM; i++) mem[i] = '0;
    q_alu = 0; q_alu2 = 0; q_mul = 0; q_dq = 0; q_dr = 0; q_mem = 0; m_status = 0; div_cnt = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // q_mem is not reset: load a known value first
    begin
      cw_t c;
      c = '0; c.mem_re = 1'b1; c.mem_addr = MA_IMM; c.imm = 0;
      step(c, 1'b1);
    end
    for (int n = 0; n < 6000; n++) begin
      cw_t c;
      c = rand_cw(div_cnt == 0);
      // keep memory addresses inside a small window so reads hit written words
      if (c.mem_addr == MA_IMM) c.imm = c.imm % 64;
      if (c.mem_addr == MA_ALU || c.mem_addr == MA_ALU2 || c.mem_addr == MA_B1 || c.mem_addr == MA_B2)
        if ($urandom % 2 != 0) c.mem_addr = MA_IMM;
      step(c, ($urandom % 8) != 0);
      if (n % 200 == 199) begin scan_rf(); scan_mem(8); end
    end
    scan_rf();
    scan_mem(64);
    expect_eq("forwarded compares seen", int'(n_fwd > 0), 1);
    expect_eq("parallel ALU cycles seen", int'(n_par > 0), 1);
    expect_eq("dual write-backs seen", int'(n_dual > 0), 1);
    expect_eq("divisions seen", int'(n_div > 0), 1);
    $display("fwd=%0d par=%0d dual=%0d div=%0d", n_fwd, n_par, n_dual, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
