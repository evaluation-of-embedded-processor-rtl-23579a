// tb_nisc_bdd: the BDD case-study workload on the NISC processor.
//
// A small BDD package is assembled into control words and run on nisc_top at
// its default size. It builds the BDDs of every output of an n x n-bit array
// multiplier (n = 3, then n = 4; the carry-save scheme of partial products y_k x_i,
// half and full adders, sums s_ki and carries c_ki):
//   mk(v, l, h)      unique-table lookup/insert; bucket = TRIPLE(v,l,h) mod TSIZE
//   apply(op, a, b)  recursive AND / OR / XOR with terminal rules and a
//                    direct-mapped computed cache; index = (PAIR(a,b)+op) mod CSIZE
//   PAIR(a,b)        = ((a+b)(a+b+1))/2 + a, the division by 2 done as a shift
//   TRIPLE(a,b,c)    = PAIR(c, PAIR(a,b))
// Each modulo uses the 16-bit divider on the low 16 bits of the hash.
// The gate list (VAR, AND, OR, XOR gates over signal slots) is written to data
// memory by the testbench; a loop in the program evaluates it in order.
//
// The package is assembled twice and each version runs on both circuits.
// The plain schedule runs every macro alone. The tuned schedule handles
// apply's stack frame with ALU2, both write ports and pipelined memory
// accesses, and computes the cache key while the divider works. Each run
// is profiled by the tags of the word at the PC: inside the recursive
// routines, routine entry/exit (frame save/restore, stack pointer, call and
// return) and division (start and wait words, including stall cycles).
//
// Checks: a reference model in the testbench runs the same algorithm and
// must agree on the node table (every node's variable, low and high child),
// the node count, the number of apply calls, cache hits and divisions, and
// every signal's root node. Independently, every product bit's BDD is
// evaluated for all 2^(2n) input pairs and compared with x*y. Every
// division must wait exactly 16 cycles minus the words scheduled between
// its start and its wait word. The tuned schedule must use both ALUs in one
// cycle and take fewer total, entry/exit and division cycles than the
// plain one.
//
// The algorithm (unique table, recursive apply with a computed cache, the
// PAIR/TRIPLE hashes, shift for /2, modulo on the divider) and the
// multiplier circuit follow the case study. The memory map, table sizes,
// cache key, variable order and both schedules are this testbench's own.
module tb_nisc_bdd;
  import nisc_pkg::*;
  import nisc_asm_pkg::*;

  localparam int NMAX = 4;            // largest multiplier operand width run
  int N;                              // operand width of the current run
  // BDD variables: var(x_i) = 2i, var(y_i) = 2i+1; terminals carry var 2N

  // data memory map (word addresses)
  localparam int A_NODES = 0, A_NGATES = 1, A_NAPPLY = 2, A_NHITS = 3,
                 A_TSIZE = 4, A_CSIZE = 5;
  localparam int GATES = 16, SIG = 320, VARS = 448, LOWS = 1088, HIGHS = 1728,
                 NEXTS = 2368, HASH = 3008, CACHE = 3232, STACK = 4095;
  localparam int N_MAX = 640, TSIZE = 211, CSIZE = 97;
  // gate opcodes
  localparam int G_AND = 0, G_OR = 1, G_XOR = 2, G_VAR = 3;
  // registers
  localparam int A0 = 1, A1 = 2, A2 = 3, RV = 4, T5 = 5, T6 = 6, T7 = 7, T8 = 8,
                 T9 = 9, T10 = 10, T11 = 11, T12 = 12, T13 = 13, T14 = 14,
                 R_TS = 20, R_CS = 21, R_FR = 22, R_I = 25, R_NG = 26, R_DST = 27,
                 R_SP = 30, R_RA = 31;

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
    wait (cyc == 3000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask
  task automatic expect_true(string what, bit ok);
    expect_eq(what, int'(ok), 1);
  endtask

  // ------------------------------------------------------ macro assembler
  // Straight-line macros expand into control words; labels are resolved at
  // the end. Most macros use the ALU and write back one word later.
  cw_t prog [$];
  int  labels [string];
  typedef struct { int idx; string name; bit call; } fix_t;
  fix_t fixes [$];

  // Every word carries profile tags: inside apply/mk, routine entry/exit
  // (frame save/restore, stack pointer, call and return words), division
  // (start and wait words, so divider stalls count here).
  localparam byte TG_ROUT = 1, TG_CTX = 2, TG_DIV = 4;
  byte tags [$];
  byte cur_tag;
  int  gap_ap;                        // words between start and wait of apply's division

  function automatic void w(cw_t c); prog.push_back(c); tags.push_back(cur_tag); endfunction
  function automatic void tw(cw_t c, byte t);
    byte save = cur_tag;
    cur_tag |= t; w(c); cur_tag = save;
  endfunction
  function automatic void label(string s); labels[s] = prog.size(); endfunction
  function automatic void to(cw_t c, string target, bit call = 0);
    fix_t f;
    f.idx = prog.size(); f.name = target; f.call = call;
    fixes.push_back(f);
    tw(c, call ? TG_CTX : 0);
  endfunction

  function automatic void li(int r, int v);
    w(k(wb0(nop(), r, WB_IMM), v));
  endfunction
  function automatic void alur(alu_op_e op, int r, int s, int t);
    w(alu(rd(nop(), s, t), op, OP_B1, OP_B2));
    w(wb0(nop(), r, WB_ALU));
  endfunction
  function automatic void alui(alu_op_e op, int r, int s, int v);
    w(k(alu(rd(nop(), s), op, OP_B1, OP_IMM), v));
    w(wb0(nop(), r, WB_ALU));
  endfunction
  function automatic void mov(int r, int s); alur(ALU_OR, r, s, 0); endfunction
  function automatic void mulr(int r, int s, int t);
    w(mul(rd(nop(), s, t), OP_B1, OP_B2));
    w(wb0(nop(), r, WB_MUL));
  endfunction
  // r = s mod t on the divider; the second word waits for the result
  function automatic void modr(int r, int s, int t);
    tw(div(rd(nop(), s, t), OP_B1, OP_B2), TG_DIV);
    tw(waitdiv(wb0(nop(), r, WB_DIVR)), TG_DIV);
  endfunction
  // r = mem[s + off]
  function automatic void ldw(int r, int s, int off);
    w(k(alu(rd(nop(), s), ALU_ADD, OP_B1, OP_IMM), off));
    w(ld(nop(), MA_ALU));
    w(wb0(nop(), r, WB_MEM));
  endfunction
  function automatic void lda(int r, int a);
    w(k(ld(nop(), MA_IMM), a));
    w(wb0(nop(), r, WB_MEM));
  endfunction
  // mem[b + off] = s
  function automatic void stw(int s, int b, int off);
    w(k(alu(rd(nop(), b), ALU_ADD, OP_B1, OP_IMM), off));
    w(st(rd(nop(), 0, s), MA_ALU));
  endfunction
  function automatic void sta(int s, int a);
    w(k(st(rd(nop(), 0, s), MA_IMM), a));
  endfunction
  // branch if (s op t) / (s op constant)
  function automatic void br(cmp_op_e op, int s, int t, string target);
    w(cmp(rd(nop(), s, t), op, CS_B1, CS_B2));
    to(nx(nop(), NX_BRT), target);
  endfunction
  function automatic void bri(cmp_op_e op, int s, int v, string target);
    w(k(cmp(rd(nop(), s), op, CS_B1, CS_IMM), v));
    to(nx(nop(), NX_BRT), target);
  endfunction
  // branch if (mem[b + off] op t), comparing the memory output register
  // directly through the comparator's forwarding path
  function automatic void brmem(cmp_op_e op, int b, int off, int t, string target);
    w(k(alu(rd(nop(), b), ALU_ADD, OP_B1, OP_IMM), off));
    w(ld(nop(), MA_ALU));
    w(cmp(rd(nop(), 0, t), op, CS_MEM, CS_B2));
    to(nx(nop(), NX_BRT), target);
  endfunction
  function automatic void jmp(string target); to(nx(nop(), NX_JMP), target); endfunction
  function automatic void call(string target);
    to(nx(wb0(nop(), R_RA, WB_IMM), NX_JMP), target, 1'b1);
  endfunction
  function automatic void ret(); tw(nx(rd(nop(), R_RA), NX_ADDR), TG_CTX); endfunction
  // memory counter increment
  function automatic void incm(int a);
    lda(T14, a);
    alui(ALU_ADD, T14, T14, 1);
    sta(T14, a);
  endfunction
  // t = PAIR(a, b) = ((a+b)(a+b+1) >> 1) + a, using u as scratch
  function automatic void pair(int t, int a, int b, int u);
    alur(ALU_ADD, t, a, b);
    alui(ALU_ADD, u, t, 1);
    mulr(t, t, u);
    alui(ALU_SRL, t, t, 1);
    alur(ALU_ADD, t, t, a);
  endfunction

  // ---- macros of the tuned schedule
  // d0 = s0 and d1 = s1 through ALU and ALU2 in parallel, both written back
  // in the second word by the two write ports
  function automatic void dmov(int d0, int s0, int d1, int s1);
    w(alu2(alu(rd(nop(), s0, s1), ALU_PASSB, OP_B1, OP_B1), ALU_PASSB, OP_B1, OP_B2));
    w(wb1(wb0(nop(), d0, WB_ALU), d1, WB_ALU2));
  endfunction
  // Push a frame of fsz words holding regs[0..] at SP-fsz+0.. . ALU computes
  // the first slot address while ALU2 computes the new SP; then one store
  // per word, each word's ALU forming the next slot address.
  function automatic void pushf(int regs [$], int fsz);
    cw_t c;
    c = k(alu2(alu(rd(nop(), R_SP), ALU_ADD, OP_B1, OP_IMM), ALU_ADD, OP_B1, OP_IMM), -fsz);
    tw(c, TG_CTX);
    for (int j = 0; j < regs.size(); j++) begin
      c = st(rd(nop(), R_SP, regs[j]), MA_ALU);
      if (j == 0) c = wb1(c, R_SP, WB_ALU2);  // SP is new from the next word on
      if (j + 1 < regs.size()) c = k(alu(c, ALU_ADD, OP_B1, OP_IMM), (j == 0) ? 1 - fsz : j + 1);
      tw(c, TG_CTX);
    end
  endfunction
  // Pipelined frame accesses: op j loads (sts[j] = 0) or stores regs[j] at
  // SP + offs[j]. Word j forms the address of op j in the ALU, performs the
  // access of op j-1 and writes back the load of op j-2. pop: ALU2 forms
  // SP + FRAME in the first word and the last word writes it to SP.
  // mvd >= 0: ALU2 copies register mvs to mvd alongside.
  function automatic void frameops(int regs [$], int offs [$], bit sts [$], bit pop = 0,
                                   int mvd = -1, int mvs = 0);
    int n = regs.size();
    int last = sts[n - 1] ? n : n + 1;
    cw_t c;
    int r2;
    for (int j = 0; j <= last; j++) begin
      c = nop();
      r2 = 0;
      if (j < n) c = k(alu(c, ALU_ADD, OP_B1, OP_IMM), offs[j]);
      if (j >= 1 && j <= n) begin
        if (sts[j - 1]) begin c = st(c, MA_ALU); r2 = regs[j - 1]; end
        else c = ld(c, MA_ALU);
      end
      if (j >= 2 && !sts[j - 2]) c = wb0(c, regs[j - 2], WB_MEM);
      if (j == 0 && pop) begin c = alu2(c, ALU_ADD, OP_B1, OP_B2); r2 = R_FR; end
      if (j == 0 && mvd >= 0) begin c = alu2(c, ALU_PASSB, OP_B1, OP_B2); r2 = mvs; end
      if (j == 1 && mvd >= 0) c = wb1(c, mvd, WB_ALU2);
      if (j == last && pop) c = wb1(c, R_SP, WB_ALU2);
      tw(rd(c, R_SP, r2), TG_CTX);
    end
  endfunction

  // tuned = 0: every macro runs alone, the way a plain sequential schedule
  // would; tuned = 1: apply's frame handling uses ALU2, both write ports and
  // pipelined memory accesses, and its cache-index division overlaps with
  // the key computation.
  task automatic build(bit tuned);
    prog.delete(); tags.delete(); labels.delete(); fixes.delete();
    cur_tag = 0;
    // ---- main: evaluate the gate list
    li(R_SP, STACK);
    li(R_FR, 8);
    lda(R_TS, A_TSIZE);
    lda(R_CS, A_CSIZE);
    lda(R_NG, A_NGATES);
    li(R_I, 0);
    label("loop");
    br(CMP_GEU, R_I, R_NG, "done");
    alui(ALU_SLL, T5, R_I, 2);
    ldw(T6, T5, GATES);            // op
    ldw(R_DST, T5, GATES + 1);     // destination slot
    ldw(T7, T5, GATES + 2);        // source 1 (variable index for VAR)
    ldw(T8, T5, GATES + 3);        // source 2
    bri(CMP_NE, T6, G_VAR, "gate_apply");
    mov(A0, T7);
    li(A1, 0);
    li(A2, 1);
    call("mk");
    jmp("gate_store");
    label("gate_apply");
    mov(A0, T6);
    ldw(A1, T7, SIG);
    ldw(A2, T8, SIG);
    call("apply");
    label("gate_store");
    stw(RV, R_DST, SIG);
    alui(ALU_ADD, R_I, R_I, 1);
    jmp("loop");
    label("done");
    w(nx(nop(), NX_HALT));

    // ---- apply(op = A0, a = A1, b = A2) -> RV
    label("apply");
    cur_tag = TG_ROUT;
    incm(A_NAPPLY);
    bri(CMP_NE, A0, G_AND, "ap_notand");
    bri(CMP_EQ, A1, 0, "ap_ret0");
    bri(CMP_EQ, A2, 0, "ap_ret0");
    bri(CMP_EQ, A1, 1, "ap_retb");
    bri(CMP_EQ, A2, 1, "ap_reta");
    br(CMP_EQ, A1, A2, "ap_reta");
    jmp("ap_general");
    label("ap_notand");
    bri(CMP_NE, A0, G_OR, "ap_xor");
    bri(CMP_EQ, A1, 1, "ap_ret1");
    bri(CMP_EQ, A2, 1, "ap_ret1");
    bri(CMP_EQ, A1, 0, "ap_retb");
    bri(CMP_EQ, A2, 0, "ap_reta");
    br(CMP_EQ, A1, A2, "ap_reta");
    jmp("ap_general");
    label("ap_xor");
    br(CMP_EQ, A1, A2, "ap_ret0");
    bri(CMP_EQ, A1, 0, "ap_retb");
    bri(CMP_EQ, A2, 0, "ap_reta");
    jmp("ap_general");
    label("ap_ret0"); li(RV, 0); ret();
    label("ap_ret1"); li(RV, 1); ret();
    label("ap_reta"); mov(RV, A1); ret();
    label("ap_retb"); mov(RV, A2); ret();
    label("ap_general");
    // cache key (a << 12) | (b << 2) | op, index (PAIR(a,b) + op) mod CSIZE
    if (tuned) begin
      // start the division first and compute the key while it runs
      int t0;
      pair(T6, A1, A2, T7);
      alur(ALU_ADD, T6, T6, A0);
      t0 = prog.size();
      tw(div(rd(nop(), T6, R_CS), OP_B1, OP_B2), TG_DIV);
      alui(ALU_SLL, T5, A1, 12);
      alui(ALU_SLL, T7, A2, 2);
      alur(ALU_OR, T5, T5, T7);
      alur(ALU_OR, T5, T5, A0);
      gap_ap = prog.size() - t0 - 1;
      tw(waitdiv(wb0(nop(), T6, WB_DIVR)), TG_DIV);
    end else begin
      alui(ALU_SLL, T5, A1, 12);
      alui(ALU_SLL, T6, A2, 2);
      alur(ALU_OR, T5, T5, T6);
      alur(ALU_OR, T5, T5, A0);
      pair(T6, A1, A2, T7);
      alur(ALU_ADD, T6, T6, A0);
      modr(T6, T6, R_CS);
      gap_ap = 0;
    end
    alui(ALU_SLL, T6, T6, 1);
    alui(ALU_ADD, T6, T6, CACHE);
    brmem(CMP_NE, T6, 0, T5, "ap_miss");
    ldw(RV, T6, 1);
    incm(A_NHITS);
    ret();
    label("ap_miss");
    ldw(T8, A1, VARS);
    ldw(T9, A2, VARS);
    mov(T10, A1); mov(T11, A1); mov(T12, A2); mov(T13, A2);
    br(CMP_LTU, T9, T8, "ap_vb");
    mov(T14, T8);
    jmp("ap_vset");
    label("ap_vb");
    mov(T14, T9);
    label("ap_vset");
    br(CMP_NE, T8, T14, "ap_skipa");
    ldw(T10, A1, LOWS);
    ldw(T11, A1, HIGHS);
    label("ap_skipa");
    br(CMP_NE, T9, T14, "ap_skipb");
    ldw(T12, A2, LOWS);
    ldw(T13, A2, HIGHS);
    label("ap_skipb");
    // frame: 0 RA, 1 op, 2 v, 3 ha, 4 hb, 5 key, 6 cache entry, 7 low result
    if (tuned) begin
      pushf('{R_RA, A0, T14, T11, T13, T5, T6}, 8);
      dmov(A1, T10, A2, T12);
      call("apply");
      frameops('{RV, A0, A1, A2}, '{7, 1, 3, 4}, '{1, 0, 0, 0});
      call("apply");
      frameops('{A1, A0}, '{7, 2}, '{0, 0}, 0, A2, RV);
      call("mk");
      frameops('{T5, T6, R_RA}, '{5, 6, 0}, '{0, 0, 0}, 1);
      // cache entry: key at T6 (address on bus 1) while the ALU forms T6+1;
      // the second store shares its word with the return
      w(k(alu(st(rd(nop(), T6, T5), MA_B1), ALU_ADD, OP_B1, OP_IMM), 1));
      tw(nx(st(rd(nop(), R_RA, RV), MA_ALU), NX_ADDR), TG_CTX);
    end else begin
      cur_tag |= TG_CTX;
      alui(ALU_SUB, R_SP, R_SP, 8);
      stw(R_RA, R_SP, 0);
      stw(A0, R_SP, 1);
      stw(T14, R_SP, 2);
      stw(T11, R_SP, 3);
      stw(T13, R_SP, 4);
      stw(T5, R_SP, 5);
      stw(T6, R_SP, 6);
      cur_tag = TG_ROUT;
      mov(A1, T10);
      mov(A2, T12);
      call("apply");
      cur_tag |= TG_CTX;
      stw(RV, R_SP, 7);
      ldw(A0, R_SP, 1);
      ldw(A1, R_SP, 3);
      ldw(A2, R_SP, 4);
      cur_tag = TG_ROUT;
      call("apply");
      mov(A2, RV);
      cur_tag |= TG_CTX;
      ldw(A1, R_SP, 7);
      ldw(A0, R_SP, 2);
      cur_tag = TG_ROUT;
      call("mk");
      cur_tag |= TG_CTX;
      ldw(T5, R_SP, 5);
      ldw(T6, R_SP, 6);
      cur_tag = TG_ROUT;
      stw(T5, T6, 0);
      stw(RV, T6, 1);
      cur_tag |= TG_CTX;
      ldw(R_RA, R_SP, 0);
      alui(ALU_ADD, R_SP, R_SP, 8);
      cur_tag = TG_ROUT;
      ret();
    end

    // ---- mk(v = A0, l = A1, h = A2) -> RV
    label("mk");
    br(CMP_NE, A1, A2, "mk_1");
    mov(RV, A1);
    ret();
    label("mk_1");
    pair(T5, A0, A1, T6);
    pair(T6, A2, T5, T7);
    modr(T6, T6, R_TS);
    alui(ALU_ADD, T6, T6, HASH);
    ldw(T7, T6, 0);
    label("mk_chain");
    bri(CMP_EQ, T7, 0, "mk_alloc");
    brmem(CMP_NE, T7, VARS, A0, "mk_next");
    brmem(CMP_NE, T7, LOWS, A1, "mk_next");
    brmem(CMP_NE, T7, HIGHS, A2, "mk_next");
    mov(RV, T7);
    ret();
    label("mk_next");
    ldw(T7, T7, NEXTS);
    jmp("mk_chain");
    label("mk_alloc");
    lda(T9, A_NODES);
    stw(A0, T9, VARS);
    stw(A1, T9, LOWS);
    stw(A2, T9, HIGHS);
    ldw(T8, T6, 0);
    stw(T8, T9, NEXTS);
    stw(T9, T6, 0);
    alui(ALU_ADD, T8, T9, 1);
    sta(T8, A_NODES);
    mov(RV, T9);
    ret();

    foreach (fixes[i]) begin
      int tgt;
      if (!labels.exists(fixes[i].name)) $fatal(1, "unknown label %s", fixes[i].name);
      tgt = labels[fixes[i].name];
      prog[fixes[i].idx].offset = PC_W'(tgt - fixes[i].idx);
      if (fixes[i].call) prog[fixes[i].idx].imm = fixes[i].idx + 1;
    end
  endtask

  // ------------------------------------------------ multiplier gate list
  int g_op [$], g_dst [$], g_s1 [$], g_s2 [$];
  int nsig;
  int z_sig [2 * NMAX];

  function automatic int gate(int op, int s1, int s2);
    g_op.push_back(op); g_dst.push_back(nsig); g_s1.push_back(s1); g_s2.push_back(s2);
    nsig++;
    return nsig - 1;
  endfunction

  // n x n array multiplier: row 0 is y0*x, each later row adds y_k*x with a
  // chain of half and full adders; carries ripple to the left.
  task automatic build_circuit();
    int xs [NMAX], ys [NMAX], pp [NMAX][NMAX], s [NMAX], c, nb, a, b, t;
    nsig = 0;
    g_op.delete(); g_dst.delete(); g_s1.delete(); g_s2.delete();
    for (int i = 0; i < N; i++) xs[i] = gate(G_VAR, 2 * i, 0);
    for (int i = 0; i < N; i++) ys[i] = gate(G_VAR, 2 * i + 1, 0);
    for (int kk = 0; kk < N; kk++)
      for (int i = 0; i < N; i++) pp[kk][i] = gate(G_AND, ys[kk], xs[i]);
    // s[i]: bit of the running sum at weight kk+i before row kk is added
    // (-1: no bit there yet)
    z_sig[0] = pp[0][0];
    for (int i = 0; i < N - 1; i++) s[i] = pp[0][i + 1];
    s[N - 1] = -1;
    for (int kk = 1; kk < N; kk++) begin
      int ns [NMAX];
      c = -1;
      for (int i = 0; i < N; i++) begin
        a = pp[kk][i];
        b = s[i];                          // running sum bit at this weight
        if (b < 0 && c < 0) begin
          ns[i] = a;
        end else if (b < 0 || c < 0) begin  // half adder
          nb = (b < 0) ? c : b;
          ns[i] = gate(G_XOR, a, nb);
          c = gate(G_AND, a, nb);
        end else begin                      // full adder
          t = gate(G_XOR, a, b);
          ns[i] = gate(G_XOR, t, c);
          c = gate(G_OR, gate(G_AND, a, b), gate(G_AND, t, c));
        end
      end
      z_sig[kk] = ns[0];
      for (int i = 0; i < N - 1; i++) s[i] = ns[i + 1];
      s[N - 1] = c;
    end
    for (int i = 0; i < N; i++) z_sig[N + i] = s[i];
  endtask

  // -------------------------------------------------- reference model
  int m_var [N_MAX], m_low [N_MAX], m_high [N_MAX], m_next [N_MAX];
  int m_hash [TSIZE], m_ckey [CSIZE], m_cval [CSIZE], m_sig [128];
  int m_nodes, m_apply, m_hits, m_divs, m_divs_ap;

  function automatic int pairf(int a, int b);
    logic [31:0] s = 32'(a) + 32'(b);
    logic [31:0] p = s * (s + 32'd1);
    return int'((p >> 1) + 32'(a));
  endfunction

  function automatic int mod16(int x, int m);
    logic [31:0] u = 32'(x);
    m_divs++;
    return int'(u[15:0]) % m;
  endfunction

  function automatic int mk_ref(int v, int l, int h);
    int b, n;
    if (l == h) return l;
    b = mod16(pairf(h, pairf(v, l)), TSIZE);
    n = m_hash[b];
    while (n != 0) begin
      if (m_var[n] == v && m_low[n] == l && m_high[n] == h) return n;
      n = m_next[n];
    end
    n = m_nodes++;
    m_var[n] = v; m_low[n] = l; m_high[n] = h; m_next[n] = m_hash[b]; m_hash[b] = n;
    return n;
  endfunction

  function automatic int apply_ref(int op, int a, int b);
    int key, e, v, la, ha, lb, hb, l, h, r;
    m_apply++;
    case (op)
      G_AND: begin
        if (a == 0 || b == 0) return 0;
        if (a == 1) return b;
        if (b == 1 || a == b) return a;
      end
      G_OR: begin
        if (a == 1 || b == 1) return 1;
        if (a == 0) return b;
        if (b == 0 || a == b) return a;
      end
      default: begin
        if (a == b) return 0;
        if (a == 0) return b;
        if (b == 0) return a;
      end
    endcase
    key = (a << 12) | (b << 2) | op;
    e = mod16(pairf(a, b) + op, CSIZE);
    m_divs_ap++;
    if (m_ckey[e] == key) begin m_hits++; return m_cval[e]; end
    v = (m_var[b] < m_var[a]) ? m_var[b] : m_var[a];
    la = a; ha = a; lb = b; hb = b;
    if (m_var[a] == v) begin la = m_low[a]; ha = m_high[a]; end
    if (m_var[b] == v) begin lb = m_low[b]; hb = m_high[b]; end
    l = apply_ref(op, la, lb);
    h = apply_ref(op, ha, hb);
    r = mk_ref(v, l, h);
    m_ckey[e] = key; m_cval[e] = r;
    return r;
  endfunction

  // ----------------------------------------------------------- host I/O
  task automatic host_write(int a, int v);
    @(negedge clk); host_we = 1; host_addr = 12'(a); host_wdata = v;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_read(int a, output int v);
    @(negedge clk); host_addr = 12'(a);
    @(posedge clk); #1 v = host_rdata;
  endtask

  int divs_seen = 0;
  always @(posedge clk) if (running && dut.exec && dut.cw.div_start) divs_seen++;

  // cycle profile by the tags of the word at the PC
  byte tag_of [1 << PC_W];
  int  p_all, p_rout, p_ctx, p_div, p_dual;
  always @(posedge clk) if (rst_n && running) begin
    p_all++;
    if ((tag_of[pc] & TG_ROUT) != 0) p_rout++;
    if ((tag_of[pc] & TG_CTX) != 0)  p_ctx++;
    if ((tag_of[pc] & TG_DIV) != 0)  p_div++;
    if (dut.exec && dut.cw.alu_en && dut.cw.alu2_en) p_dual++;
  end

  task automatic load_prog(bit tuned);
    build(tuned);
    $display("%s schedule: %0d control words", tuned ? "tuned" : "plain", prog.size());
    foreach (tag_of[i]) tag_of[i] = 0;
    foreach (prog[i]) begin
      @(negedge clk); pm_we = 1; pm_waddr = PC_W'(i); pm_wdata = prog[i];
      tag_of[i] = tags[i];
    end
    @(negedge clk); pm_we = 0;
  endtask

  function automatic string pct(int a, int b);
    return $sformatf("%0d (%0d.%0d%%)", a, a * 100 / b, (a * 1000 / b) % 10);
  endfunction

  int h_var [N_MAX], h_low [N_MAX], h_high [N_MAX];

  function automatic bit eval(int node, int xv, int yv);
    int n = node;
    while (n > 1) begin
      int v = h_var[n];
      bit bitv = (v % 2 == 0) ? xv[v / 2] : yv[v / 2];
      n = bitv ? h_high[n] : h_low[n];
    end
    return n == 1;
  endfunction

  int cyc_of [2], ctx_of [2], div_of [2];

  task automatic run(int n, bit tuned);
    int v, nodes, napply, nhits, d0;
    N = n;
    load_prog(tuned);
    build_circuit();
    $display("%0dx%0d multiplier circuit: %0d gates", N, N, g_op.size());
    // reference run
    for (int i = 0; i < N_MAX; i++) begin m_var[i] = 0; m_low[i] = 0; m_high[i] = 0; m_next[i] = 0; end
    for (int i = 0; i < TSIZE; i++) m_hash[i] = 0;
    for (int i = 0; i < CSIZE; i++) begin m_ckey[i] = 0; m_cval[i] = 0; end
    m_var[0] = 2 * N; m_var[1] = 2 * N;
    m_nodes = 2; m_apply = 0; m_hits = 0; m_divs = 0; m_divs_ap = 0;
    foreach (g_op[i])
      m_sig[g_dst[i]] = (g_op[i] == G_VAR) ? mk_ref(g_s1[i], 0, 1)
                                           : apply_ref(g_op[i], m_sig[g_s1[i]], m_sig[g_s2[i]]);
    // data memory: empty tables, counters, gate list
    for (int i = 0; i < TSIZE; i++) host_write(HASH + i, 0);
    for (int i = 0; i < 2 * CSIZE; i++) host_write(CACHE + i, 0);
    host_write(A_NODES, 2);
    host_write(A_NAPPLY, 0);
    host_write(A_NHITS, 0);
    host_write(A_NGATES, g_op.size());
    host_write(A_TSIZE, TSIZE);
    host_write(A_CSIZE, CSIZE);
    host_write(VARS + 0, 2 * N);
    host_write(VARS + 1, 2 * N);
    foreach (g_op[i]) begin
      host_write(GATES + 4 * i, g_op[i]);
      host_write(GATES + 4 * i + 1, g_dst[i]);
      host_write(GATES + 4 * i + 2, g_s1[i]);
      host_write(GATES + 4 * i + 3, g_s2[i]);
    end
    d0 = divs_seen;
    p_all = 0; p_rout = 0; p_ctx = 0; p_div = 0; p_dual = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (running) @(negedge clk);

    host_read(A_NODES, nodes);
    host_read(A_NAPPLY, napply);
    host_read(A_NHITS, nhits);
    $display("%0dx%0d multiplier: %0d nodes (incl. 2 terminals), %0d apply calls, %0d cache hits, %0d divisions",
             N, N, nodes, napply, nhits, divs_seen - d0);
    $display("  cycles %0d, of which divider wait %0d", cycles, div_stall_cycles);
    $display("  profile: recursive routines %s, routine entry/exit %s, division %s",
             pct(p_rout, p_all), pct(p_ctx, p_all), pct(p_div, p_all));
    expect_eq("node count", nodes, m_nodes);
    expect_eq("apply calls", napply, m_apply);
    expect_eq("cache hits", nhits, m_hits);
    expect_eq("divisions", divs_seen - d0, m_divs);
    // every division waits its full 16 cycles minus the words scheduled
    // between its start and the word that needs the result
    expect_eq("divider wait", div_stall_cycles, m_divs_ap * (16 - gap_ap) + (m_divs - m_divs_ap) * 16);
    expect_eq("profile covers every cycle", p_all, cycles);
    if (tuned) expect_true("tuned schedule runs both ALUs together", p_dual > 0);
    cyc_of[tuned] = cycles; ctx_of[tuned] = p_ctx; div_of[tuned] = p_div;
    expect_true("node table fits", nodes <= N_MAX);
    for (int i = 2; i < m_nodes; i++) begin
      host_read(VARS + i, h_var[i]);  host_read(LOWS + i, h_low[i]);  host_read(HIGHS + i, h_high[i]);
      expect_eq("node var", h_var[i], m_var[i]);
      expect_eq("node low", h_low[i], m_low[i]);
      expect_eq("node high", h_high[i], m_high[i]);
    end
    for (int i = 0; i < nsig; i++) begin
      host_read(SIG + i, v);
      expect_eq("signal root", v, m_sig[i]);
    end
    // each product bit, for every operand pair
    for (int j = 0; j < 2 * N; j++) begin
      int root;
      host_read(SIG + z_sig[j], root);
      for (int xv = 0; xv < (1 << N); xv++)
        for (int yv = 0; yv < (1 << N); yv++)
          expect_eq($sformatf("z%0d(%0d*%0d)", j, xv, yv), int'(eval(root, xv, yv)), ((xv * yv) >> j) & 1);
    end
  endtask

  initial begin
    pm_wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 3; n <= NMAX; n++) begin   // 3x3 is the case study
      run(n, 0);
      run(n, 1);
      $display("%0dx%0d tuned / plain: cycles %0d%%, entry/exit cycles %0d%%, division cycles %0d%%",
               n, n, cyc_of[1] * 100 / cyc_of[0], ctx_of[1] * 100 / ctx_of[0],
               div_of[1] * 100 / div_of[0]);
      expect_true("tuned schedule takes fewer cycles", cyc_of[1] < cyc_of[0]);
      expect_true("tuned schedule spends fewer cycles on entry/exit", ctx_of[1] < ctx_of[0]);
      expect_true("tuned schedule spends fewer cycles on division", div_of[1] < div_of[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
