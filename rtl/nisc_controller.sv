// nisc_controller: control unit of the NISC processor.
//
// The controller owns the program counter and the control-word memory and,
// each cycle, hands the data path the control word at PC. The next-address
// multiplexer chooses PC+1, PC+offset (the control word's signed offset
// field), PC+offset only when the status bit from the comparator is set or
// clear, or an absolute address taken from data path bus 1 (used for
// subroutine returns). A word whose nxt field is HALT stops the processor.
//
// The control words are scheduled cycle by cycle ahead of time, so the only
// run-time hold is the divider: a word with wait_div set is held, and has no
// effect, while the divider is busy; it takes effect in the first cycle the
// divider is idle. exec tells the data path whether the current word takes
// effect.
//
// Interface and timing: after reset the processor is stopped with PC = 0.
// A start pulse while stopped begins execution at address 0 in the next
// cycle; running stays high until a HALT word. The memory is read
// synchronously at the next PC, so a taken branch costs no extra cycle.
// cycles counts the cycles of the last run (cleared by start) and
// stall_cycles the cycles of it spent waiting for the divider.
// Only the low PC_W bits of the bus-1 address are used; the upper bits of
// that port are left unread.
//
// PC, control memory and the next-address multiplexer fed by offset, status
// and address follow the processor's controller; the branch kinds, the
// divider hold, start/halt and the counters are this design's choices.
module nisc_controller
  import nisc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            running,
  // control word memory load port
  input  logic            pm_we,
  input  logic [PC_W-1:0] pm_waddr,
  input  cw_t             pm_wdata,
  // from the data path
  input  logic            status,
  input  logic [XLEN-1:0] address,
  input  logic            div_busy,
  // to the data path
  output cw_t             cw,
  output logic            exec,
  // profiling
  output logic [PC_W-1:0] pc,
  output logic [31:0]     cycles,
  output logic [31:0]     stall_cycles
);

  logic [PC_W-1:0] pc_next, pc_inc, pc_off;
  logic            stall, halt;

  nisc_pmem #(.DEPTH(1 << PC_W)) u_pmem (
    .clk   (clk),
    .raddr (pc_next),
    .rdata (cw),
    .we    (pm_we),
    .waddr (pm_waddr),
    .wdata (pm_wdata)
  );

  assign pc_inc = pc + 1'b1;
  assign pc_off = pc + cw.offset;
  assign stall  = running && cw.wait_div && div_busy;
  assign halt   = running && (cw.nxt == NX_HALT);
  assign exec   = running && !stall && !halt;

  always_comb begin
    if (!running || halt) begin
      pc_next = '0;
    end else if (stall) begin
      pc_next = pc;
    end else begin
      unique case (cw.nxt)
        NX_INC:  pc_next = pc_inc;
        NX_JMP:  pc_next = pc_off;
        NX_BRT:  pc_next = status ? pc_off : pc_inc;
        NX_BRF:  pc_next = status ? pc_inc : pc_off;
        NX_ADDR: pc_next = address[PC_W-1:0];
        default: pc_next = pc_inc;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running      <= 1'b0;
      pc           <= '0;
      cycles       <= '0;
      stall_cycles <= '0;
    end else begin
      pc <= pc_next;
      if (!running) begin
        if (start) begin
          running      <= 1'b1;
          cycles       <= '0;
          stall_cycles <= '0;
        end
      end else begin
        cycles <= cycles + 1'b1;
        if (stall) stall_cycles <= stall_cycles + 1'b1;
        if (halt)  running <= 1'b0;
      end
    end
  end

endmodule
