// tb_nisc_pmem: loads random control words through the load port and reads
// them back with the one-cycle synchronous read.
module tb_nisc_pmem;
  import nisc_pkg::*;
  localparam int DEPTH = 1024;
  logic       clk = 0, we = 0;
  logic [9:0] raddr = 0, waddr = 0;
  cw_t        rdata, wdata;
  cw_t        shadow [DEPTH];
  int checks = 0, failures = 0, cyc = 0;

  nisc_pmem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cw_t rand_cw();
    logic [$bits(cw_t)-1:0] v;
    for (int i = 0; i < $bits(cw_t); i++) v[i] = 1'($urandom);
    return cw_t'(v);
  endfunction

  initial begin
    wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = rand_cw(); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk); raddr = 10'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
