// nisc_top: customised NISC processor, controller plus final data path.
//
// The processor runs a program of precompiled control words. Each word
// steers every multiplexer and unit of the data path for one cycle; there is
// no instruction decoding. The data path holds a register file, a branch
// comparator with forwarding from all units, two ALUs, a multiplier, a
// 16-bit multi-cycle divider and a data memory, and returns status and a
// jump address to the controller.
//
// Use: hold rst_n low for a cycle, write the program through pm_we /
// pm_waddr / pm_wdata and the input data through the host port, pulse
// start. running stays high until the program executes a HALT word; then
// the host port reads results. cycles is the length of the run in clock
// cycles and div_stall_cycles the part spent waiting for the divider. The
// host data port has a one-cycle read latency.
//
// Load ports, host port and counters are this design's additions around
// the processor.
module nisc_top
  import nisc_pkg::*;
#(
  parameter int unsigned DIV_W      = 16,
  parameter int unsigned DMEM_DEPTH = 4096,
  localparam int unsigned DAW       = $clog2(DMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            running,
  input  logic            pm_we,
  input  logic [PC_W-1:0] pm_waddr,
  input  cw_t             pm_wdata,
  input  logic            host_we,
  input  logic [DAW-1:0]  host_addr,
  input  logic [XLEN-1:0] host_wdata,
  output logic [XLEN-1:0] host_rdata,
  output logic [PC_W-1:0] pc,
  output logic [31:0]     cycles,
  output logic [31:0]     div_stall_cycles
);

  cw_t             cw;
  logic            exec, status, div_busy;
  logic [XLEN-1:0] address;

  nisc_controller u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .running      (running),
    .pm_we        (pm_we),
    .pm_waddr     (pm_waddr),
    .pm_wdata     (pm_wdata),
    .status       (status),
    .address      (address),
    .div_busy     (div_busy),
    .cw           (cw),
    .exec         (exec),
    .pc           (pc),
    .cycles       (cycles),
    .stall_cycles (div_stall_cycles)
  );

  nisc_datapath #(.DIV_W(DIV_W), .DMEM_DEPTH(DMEM_DEPTH)) u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .cw         (cw),
    .exec       (exec),
    .status     (status),
    .address    (address),
    .div_busy   (div_busy),
    .host_we    (host_we),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .host_rdata (host_rdata)
  );

endmodule
