// tb_nisc_controller: fills the control-word memory with random words, runs
// the controller with random status, jump address and divider-busy inputs,
// and compares PC, the presented control word, exec, running and the cycle
// counters every cycle with a reference model of the next-address rules.
module tb_nisc_controller;
  import nisc_pkg::*;

  logic            clk = 0, rst_n = 0, start = 0, running;
  logic            pm_we = 0, status = 0, div_busy = 0, exec;
  logic [PC_W-1:0] pm_waddr = 0, pc;
  cw_t             pm_wdata, cw;
  logic [XLEN-1:0] address = 0;
  logic [31:0]     cycles, stall_cycles;

  cw_t prog [1 << PC_W];
  int checks = 0, failures = 0, cyc = 0;
  int taken = 0, stalls = 0, halts = 0, jumps = 0;

  nisc_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  initial begin
    int m_pc, m_cycles, m_stalls;
    logic m_run;
    pm_wdata = '0;
    for (int i = 0; i < (1 << PC_W); i++) begin
      cw_t c;
      int unsigned r;
      c = '0;
      for (int b = 0; b < $bits(cw_t); b++) c[b] = 1'($urandom);
      r = $urandom % 100;
      case (r) inside
        [0:39]:  c.nxt = NX_INC;
        [40:54]: c.nxt = NX_JMP;
        [55:69]: c.nxt = NX_BRT;
        [70:84]: c.nxt = NX_BRF;
        [85:98]: c.nxt = NX_ADDR;
        default: c.nxt = NX_HALT;
      endcase
      prog[i] = c;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < (1 << PC_W); i++) begin
      @(negedge clk); pm_we = 1; pm_waddr = PC_W'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 0;
    expect_eq("running after reset", int'(running), 0);
    expect_eq("exec while stopped", int'(exec), 0);
    m_run = 0; m_pc = 0; m_cycles = 0; m_stalls = 0;
    for (int n = 0; n < 20000; n++) begin
      logic m_stall, m_halt;
      int nxt_pc;
      // inputs for this cycle
      status   = 1'($urandom);
      div_busy = ($urandom % 4 == 0);
      address  = $urandom;
      start    = !m_run && ($urandom % 3 == 0);
      #1;
      if (m_run) begin
        cw_t c;
        c = prog[m_pc];
        expect_eq("pc", int'(pc), int'(m_pc));
        expect_eq("cw", int'(cw == c), 1);
        m_stall = c.wait_div && div_busy;
        m_halt  = (c.nxt == NX_HALT);
        expect_eq("exec", int'(exec), int'(!m_stall && !m_halt));
        if (m_halt) begin
          nxt_pc = 0; halts++;
        end else if (m_stall) begin
          nxt_pc = m_pc; stalls++;
        end else begin
          case (c.nxt)
            NX_JMP:  nxt_pc = m_pc + int'(c.offset);
            NX_BRT:  nxt_pc = status  ? m_pc + int'(c.offset) : m_pc + 1;
            NX_BRF:  nxt_pc = !status ? m_pc + int'(c.offset) : m_pc + 1;
            NX_ADDR: nxt_pc = int'(address[PC_W-1:0]);
            default: nxt_pc = m_pc + 1;
          endcase
          if ((c.nxt == NX_BRT && status) || (c.nxt == NX_BRF && !status)) taken++;
          if (c.nxt == NX_ADDR) jumps++;
        end
        nxt_pc = nxt_pc & ((1 << PC_W) - 1);
        m_cycles++;
        if (m_stall) m_stalls++;
        if (m_halt) m_run = 0;
        m_pc = nxt_pc;
      end else begin
        expect_eq("exec stopped", int'(exec), 0);
        if (start) begin m_run = 1; m_cycles = 0; m_stalls = 0; m_pc = 0; end
      end
      @(posedge clk); #1;
      expect_eq("running", int'(running), int'(m_run));
      expect_eq("cycles", int'(cycles), int'(m_cycles));
      expect_eq("stall_cycles", int'(stall_cycles), int'(m_stalls));
      @(negedge clk);
    end
    expect_eq("taken branches seen", int'(taken > 0), 1);
    expect_eq("divider stalls seen", int'(stalls > 0), 1);
    expect_eq("halts seen", int'(halts > 0), 1);
    expect_eq("address jumps seen", int'(jumps > 0), 1);
    $display("taken=%0d stalls=%0d halts=%0d jumps=%0d", taken, stalls, halts, jumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
