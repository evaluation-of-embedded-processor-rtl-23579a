// tb_nisc_dmem: random traffic on both ports of the data memory against a
// shadow array; checks one-cycle read latency, that rdata holds while re is
// low, and that the host port sees data path writes.
module tb_nisc_dmem;
  localparam int DEPTH = 4096;
  logic        clk = 0, re = 0, we = 0, host_we = 0;
  logic [11:0] addr = 0, host_addr = 0;
  logic [31:0] wdata = 0, rdata, host_wdata = 0, host_rdata;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0, cyc = 0;

  nisc_dmem #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    // host fills a region
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); host_we = 1; host_addr = 12'(i * 61); host_wdata = $urandom;
      shadow[i * 61] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      addr = ($urandom % 2 != 0) ? 12'(($urandom % 64) * 61) : 12'($urandom);
      we = ($urandom % 3 == 0); re = !we && ($urandom % 2 == 0);
      wdata = $urandom;
      host_addr = 12'(($urandom % 2 != 0) ? addr : 12'($urandom));
      held = rdata;
      @(posedge clk); #1;
      if (re) begin
        checks++;
        if (rdata !== shadow[addr]) begin failures++; $display("FAIL rd %h=%h exp %h", addr, rdata, shadow[addr]); end
      end else begin
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL rdata changed without re"); end
      end
      checks++;
      if (host_rdata !== shadow[host_addr]) begin failures++; $display("FAIL host rd %h", host_addr); end
      if (we) shadow[addr] = wdata;
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
