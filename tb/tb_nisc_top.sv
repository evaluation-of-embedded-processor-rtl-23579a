// tb_nisc_top: end-to-end test of the NISC processor at its default size.
//
// The testbench assembles a hand-scheduled control-word program with the
// ingredients of a BDD package's inner loop: a recursive routine with stack
// frames (return address, argument, local) and a direct-mapped result
// cache indexed by a hash computed with a multiply, a shift (division by 2)
// and a modulo on the 16-bit divider. The routine is memoised Fibonacci:
//   fib(n) = n                          for n < 2
//   fib(n) = cache hit ? cached value : fib(n-1) + fib(n-2), then cached
//   hash(n) = ((((n * 40503) mod 2^32) >> 1) mod 2^16) mod P
// Each run reads n and P from data memory, counts the non-leaf calls and
// the cache hits in memory words 16 and 17 and leaves the result in word 0.
// A reference model in the testbench runs the same algorithm and predicts
// result, calls and hits; the divider wait is predicted exactly (12 stall
// cycles per division with the 4 words scheduled between divider start and
// result use). Every mechanism of the processor (divider stall, taken
// conditional branch, return through a data path address, comparator
// forwarding, both ALUs busy in one cycle, both write ports in one cycle,
// halt and restart) is counted and must occur.
module tb_nisc_top;
  import nisc_pkg::*;
  import nisc_asm_pkg::*;

  logic            clk = 0, rst_n = 0, start = 0, running;
  logic            pm_we = 0, host_we = 0;
  logic [PC_W-1:0] pm_waddr = 0, pc;
  cw_t             pm_wdata;
  logic [11:0]     host_addr = 0;
  logic [31:0]     host_wdata = 0, host_rdata, cycles, div_stall_cycles;

  nisc_top dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ program
  cw_t prog [$];
  function automatic int emit(cw_t c);
    prog.push_back(c);
    return prog.size() - 1;
  endfunction

  localparam int R_N = 1, R_RES = 2, R_T = 3, R_CNT = 4, R_H = 5, R_E = 6,
                 R_KEY = 7, R_VA = 8, R_ONE = 24, R_TWO = 25, R_CB = 26,
                 R_P = 27, R_MK = 28, R_SP = 30, R_RA = 31;
  localparam int STACK_TOP = 4000, CACHE = 1024, MULK = 40503;

  task automatic build();
    int m5, ret_main, fib, f1, f15, f21, ret1, f27, ret2, hit, leaf;
    cw_t c;
    // main
    void'(emit(k(wb0(nop(), R_SP, WB_IMM), STACK_TOP)));
    void'(emit(k(wb0(nop(), R_MK, WB_IMM), MULK)));
    void'(emit(k(ld(nop(), MA_IMM), 2)));
    void'(emit(k(ld(wb0(nop(), R_P, WB_MEM), MA_IMM), 1)));
    void'(emit(k(wb1(wb0(nop(), R_N, WB_MEM), R_CB, WB_IMM), CACHE)));
    void'(emit(k(wb0(nop(), R_ONE, WB_IMM), 1)));
    void'(emit(k(wb0(nop(), R_TWO, WB_IMM), 2)));
    m5 = emit(wb0(nop(), R_RA, WB_IMM));               // return address patched below
    ret_main = emit(k(st(rd(nop(), 0, R_RES), MA_IMM), 0));
    void'(emit(nx(nop(), NX_HALT)));
    // fib(n): n in R_N, return address in R_RA, result in R_RES
    fib = emit(mul(k(cmp(rd(nop(), R_N, R_MK), CMP_LTU, CS_B1, CS_IMM), 2), OP_B1, OP_B2));
    f1  = emit(wb0(nop(), R_T, WB_MUL));                // + branch to leaf
    void'(emit(k(alu(rd(nop(), R_T), ALU_SRL, OP_B1, OP_IMM), 1)));
    void'(emit(wb0(nop(), R_T, WB_ALU)));
    void'(emit(k(ld(div(rd(nop(), R_T, R_P), OP_B1, OP_B2), MA_IMM), 16)));
    void'(emit(wb0(nop(), R_CNT, WB_MEM)));
    void'(emit(k(alu(rd(nop(), R_CNT), ALU_ADD, OP_B1, OP_IMM), 1)));
    void'(emit(wb0(nop(), R_CNT, WB_ALU)));
    void'(emit(k(st(rd(nop(), 0, R_CNT), MA_IMM), 16)));
    void'(emit(waitdiv(wb0(nop(), R_H, WB_DIVR))));
    void'(emit(k(alu(rd(nop(), R_H), ALU_SLL, OP_B1, OP_IMM), 1)));
    void'(emit(wb0(nop(), R_H, WB_ALU)));
    void'(emit(alu(rd(nop(), R_H, R_CB), ALU_ADD, OP_B1, OP_B2)));
    void'(emit(k(alu2(wb0(ld(rd(nop(), R_N), MA_ALU), R_E, WB_ALU), ALU_ADD, OP_B1, OP_IMM), 1)));
    void'(emit(cmp(nop(), CMP_EQ, CS_MEM, CS_ALU2)));  // forwarded compare: cache key
    f15 = emit(k(alu2(rd(nop(), R_SP), ALU_SUB, OP_B1, OP_IMM), 4));  // + branch to hit
    void'(emit(st(rd(wb1(nop(), R_SP, WB_ALU2), 0, R_RA), MA_ALU2)));
    void'(emit(alu2(k(alu(rd(nop(), R_SP, R_TWO), ALU_ADD, OP_B1, OP_IMM), 1), ALU_ADD, OP_B1, OP_B2)));
    void'(emit(st(rd(nop(), 0, R_N), MA_ALU)));
    void'(emit(st(rd(nop(), 0, R_E), MA_ALU2)));
    void'(emit(k(alu(rd(nop(), R_N), ALU_SUB, OP_B1, OP_IMM), 1)));
    f21 = emit(wb1(wb0(nop(), R_N, WB_ALU), R_RA, WB_IMM));
    ret1 = emit(k(alu(rd(nop(), R_SP), ALU_ADD, OP_B1, OP_IMM), 3));
    void'(emit(k(alu(st(rd(nop(), R_SP, R_RES), MA_ALU), ALU_ADD, OP_B1, OP_IMM), 1)));
    void'(emit(ld(nop(), MA_ALU)));
    void'(emit(wb0(nop(), R_N, WB_MEM)));
    void'(emit(k(alu(rd(nop(), R_N), ALU_SUB, OP_B1, OP_IMM), 2)));
    f27 = emit(wb1(wb0(nop(), R_N, WB_ALU), R_RA, WB_IMM));
    ret2 = emit(alu2(k(alu(rd(nop(), R_SP, R_ONE), ALU_ADD, OP_B1, OP_IMM), 3), ALU_ADD, OP_B1, OP_B2));
    void'(emit(ld(nop(), MA_ALU)));
    void'(emit(wb0(nop(), R_T, WB_MEM)));
    void'(emit(ld(alu(rd(nop(), R_RES, R_T), ALU_ADD, OP_B1, OP_B2), MA_ALU2)));
    void'(emit(alu2(wb1(wb0(rd(nop(), R_SP, R_TWO), R_RES, WB_ALU), R_N, WB_MEM), ALU_ADD, OP_B1, OP_B2)));
    void'(emit(ld(nop(), MA_ALU2)));
    void'(emit(ld(wb0(rd(nop(), R_SP), R_E, WB_MEM), MA_B1)));
    void'(emit(k(alu(alu2(wb0(rd(nop(), R_N, R_E), R_RA, WB_MEM), ALU_ADD, OP_B1, OP_IMM), ALU_ADD, OP_B2, OP_IMM), 1)));
    void'(emit(k(alu2(wb1(wb0(rd(nop(), R_SP), R_KEY, WB_ALU2), R_VA, WB_ALU), ALU_ADD, OP_B1, OP_IMM), 4)));
    void'(emit(st(rd(wb0(nop(), R_SP, WB_ALU2), R_E, R_KEY), MA_B1)));
    void'(emit(nx(st(rd(nop(), R_RA, R_RES), MA_ALU), NX_ADDR)));
    // cache hit: result from the entry's second word, count the hit
    hit = emit(k(alu(rd(nop(), R_E), ALU_ADD, OP_B1, OP_IMM), 1));
    void'(emit(ld(nop(), MA_ALU)));
    void'(emit(k(ld(wb0(nop(), R_RES, WB_MEM), MA_IMM), 17)));
    void'(emit(wb0(nop(), R_CNT, WB_MEM)));
    void'(emit(k(alu(rd(nop(), R_CNT), ALU_ADD, OP_B1, OP_IMM), 1)));
    void'(emit(wb0(nop(), R_CNT, WB_ALU)));
    void'(emit(nx(k(st(rd(nop(), R_RA, R_CNT), MA_IMM), 17), NX_ADDR)));
    // leaf: result = n
    leaf = emit(alu(rd(nop(), R_N, 0), ALU_OR, OP_B1, OP_B2));
    void'(emit(nx(rd(wb0(nop(), R_RES, WB_ALU), R_RA), NX_ADDR)));
    // patch calls, returns and branches
    prog[m5]  = nx(k(prog[m5], ret_main), NX_JMP, fib - m5);
    prog[f1]  = nx(prog[f1], NX_BRT, leaf - f1);
    prog[f15] = nx(prog[f15], NX_BRT, hit - f15);
    prog[f21] = nx(k(prog[f21], ret1), NX_JMP, fib - f21);
    prog[f27] = nx(k(prog[f27], ret2), NX_JMP, fib - f27);
  endtask

  // ---------------------------------------------------- reference model
  int m_key [64], m_val [64], m_calls, m_hits;
  function automatic int fib_ref(int n, int p);
    int h, a, b;
    logic [31:0] t;
    if (n < 2) return n;
    m_calls++;
    t = 32'(n) * 32'(MULK);
    t = t >> 1;
    h = int'(t[15:0]) % p;
    if (m_key[h] == n + 1) begin m_hits++; return m_val[h]; end
    a = fib_ref(n - 1, p);
    b = fib_ref(n - 2, p);
    m_key[h] = n + 1; m_val[h] = a + b;
    return a + b;
  endfunction

  // ------------------------------------------------- mechanism counters
  int c_stall = 0, c_taken = 0, c_ret = 0, c_fwd = 0, c_par = 0, c_dual = 0,
      c_exec = 0, c_halt = 0, c_hits = 0;
  always @(posedge clk) if (running) begin
    if (dut.u_ctrl.stall) c_stall++;
    if (dut.exec) begin
      c_exec++;
      if (dut.cw.nxt == NX_BRT && dut.status) c_taken++;
      if (dut.cw.nxt == NX_ADDR) c_ret++;
      if (dut.cw.cmp_en && (dut.cw.cmp_a >= CS_ALU || dut.cw.cmp_b >= CS_ALU)) c_fwd++;
      if (dut.cw.alu_en && dut.cw.alu2_en) c_par++;
      if (dut.cw.we0 && dut.cw.we1) c_dual++;
    end
  end

  always @(negedge running) if (rst_n) c_halt++;

  task automatic host_write(int a, int v);
    @(negedge clk); host_we = 1; host_addr = 12'(a); host_wdata = v;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_read(int a, output int v);
    @(negedge clk); host_addr = 12'(a);
    @(posedge clk); #1 v = host_rdata;
  endtask

  task automatic run(int n, int p);
    int res, calls, hits, exp, e0, s0;
    for (int i = 0; i < 64; i++) begin m_key[i] = 0; m_val[i] = 0; end
    m_calls = 0; m_hits = 0;
    exp = fib_ref(n, p);
    for (int i = 0; i < 2 * p; i++) host_write(CACHE + i, 0);
    host_write(16, 0); host_write(17, 0);
    host_write(1, n); host_write(2, p);
    e0 = c_exec;
    s0 = c_stall;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (running) @(negedge clk);
    host_read(0, res); host_read(16, calls); host_read(17, hits);
    $display("fib(%0d) P=%0d -> %0d, calls %0d, hits %0d, %0d cycles, %0d divider stall cycles",
             n, p, res, calls, hits, cycles, div_stall_cycles);
    expect_eq("result", int'(res), int'(exp));
    expect_eq("calls", int'(calls), int'(m_calls));
    expect_eq("hits", int'(hits), int'(m_hits));
    expect_eq("divider stall cycles", int'(div_stall_cycles), int'(12 * m_calls));
    expect_eq("cycles = executed + stalled + halt", int'(cycles), int'((c_exec - e0) + (c_stall - s0) + 1));
    c_hits += hits;
  endtask

  initial begin
    pm_wdata = '0;
    build();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); pm_we = 1; pm_waddr = PC_W'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 0;
    run(1, 13);
    run(2, 13);
    run(10, 13);
    run(15, 7);
    run(20, 31);
    run(12, 3);
    run(9, 1);
    $display("stalls=%0d taken=%0d returns=%0d fwd=%0d par=%0d dual=%0d halts=%0d hits=%0d",
             c_stall, c_taken, c_ret, c_fwd, c_par, c_dual, c_halt, c_hits);
    expect_eq("divider stall seen", int'(c_stall > 0), 1);
    expect_eq("taken branch seen", int'(c_taken > 0), 1);
    expect_eq("return seen", int'(c_ret > 0), 1);
    expect_eq("forwarded compare seen", int'(c_fwd > 0), 1);
    expect_eq("parallel ALUs seen", int'(c_par > 0), 1);
    expect_eq("dual write-back seen", int'(c_dual > 0), 1);
    expect_eq("halts seen", int'(c_halt), 7);
    expect_eq("cache hits seen", int'(c_hits > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
