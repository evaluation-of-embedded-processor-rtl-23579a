// tb_nisc_regfile: random reads and writes on both ports of the register
// file against a shadow array, including same-address writes (port 1 wins)
// and the reset clearing.
module tb_nisc_regfile;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  ra1, ra2, wa0, wa1;
  logic [31:0] rd1, rd2, wd0, wd1;
  logic        we0 = 0, we1 = 0;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0, cyc = 0;

  nisc_regfile #(.DEPTH(32), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int i = 0; i < 32; i += 2) begin
      ra1 = 5'(i); ra2 = 5'(i + 1); #1;
      checks += 2;
      if (rd1 !== shadow[i])   begin failures++; $display("FAIL r%0d %h exp %h", i, rd1, shadow[i]); end
      if (rd2 !== shadow[i+1]) begin failures++; $display("FAIL r%0d %h exp %h", i+1, rd2, shadow[i+1]); end
    end
  endtask

  initial begin
    ra1 = 0; ra2 = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    check_reads();
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we0 = 1'($urandom); we1 = 1'($urandom);
      wa0 = 5'($urandom); wa1 = (n % 7 == 0) ? wa0 : 5'($urandom);
      wd0 = $urandom; wd1 = $urandom;
      @(posedge clk); #1;
      if (we0) shadow[wa0] = wd0;
      if (we1) shadow[wa1] = wd1;
      we0 = 0; we1 = 0;
      if (n % 25 == 0) check_reads();
    end
    check_reads();
    // reset clears
    @(negedge clk); rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
