// tb_nisc_divider: divides random and corner operands with the 16-bit
// divider and checks quotient, remainder and the latency: busy must last
// exactly DIV_W cycles after the start cycle. Also checks a restart while
// busy and the divide-by-zero convention.
module tb_nisc_divider;
  localparam int DIV_W = 16;
  logic        clk = 0, rst_n = 0, start = 0, busy;
  logic [31:0] dividend = 0, divisor = 1, quotient, remainder;
  int checks = 0, failures = 0, cyc = 0;

  nisc_divider #(.WIDTH(32), .DIV_W(DIV_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(logic [31:0] x, logic [31:0] d);
    int t0, lat;
    logic [15:0] xl = x[15:0], dl = d[15:0];
    logic [31:0] eq, er;
    if (dl == 0) begin eq = 32'h0000_FFFF; er = {16'd0, xl}; end
    else begin eq = {16'd0, xl / dl}; er = {16'd0, xl % dl}; end
    @(negedge clk);
    dividend = x; divisor = d; start = 1;
    @(negedge clk);
    start = 0; dividend = $urandom; divisor = $urandom;
    t0 = cyc;
    while (busy) @(negedge clk);
    lat = cyc - t0;
    checks += 3;
    if (lat != DIV_W) begin failures++; $display("FAIL latency %0d", lat); end
    if (quotient !== eq)  begin failures++; $display("FAIL %0d/%0d q=%0d exp %0d", xl, dl, quotient, eq); end
    if (remainder !== er) begin failures++; $display("FAIL %0d%%%0d r=%0d exp %0d", xl, dl, remainder, er); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after reset"); end
    divide(32'd990, 32'd106);
    divide(32'd65535, 32'd1);
    divide(32'd5, 32'd7);
    divide(32'd65535, 32'd65535);
    divide(32'h1234_5678, 32'h0001_0003);  // upper bits ignored
    divide(32'd77, 32'd0);
    for (int n = 0; n < 200; n++) divide($urandom, ($urandom % 3 == 0) ? ($urandom % 200) : $urandom);
    // restart while busy: the second division wins
    @(negedge clk); dividend = 1000; divisor = 3; start = 1;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    dividend = 1001; divisor = 10; start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    checks++;
    if (quotient !== 32'd100 || remainder !== 32'd1) begin
      failures++; $display("FAIL restart q=%0d r=%0d", quotient, remainder);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
