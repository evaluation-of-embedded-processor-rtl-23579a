// tb_nisc_multiplier: checks the low word of the product against a
// shift-and-add reference on corner and random operands.
module tb_nisc_multiplier;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  nisc_multiplier #(.WIDTH(32)) dut (.a(a), .b(b), .y(y));

  function automatic logic [31:0] ref_mul(logic [31:0] x, logic [31:0] z);
    logic [31:0] acc = '0;
    for (int i = 0; i < 32; i++) if (z[i]) acc += (x << i);
    return acc;
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] z);
    a = x; b = z; #1;
    checks++;
    if (y !== ref_mul(x, z)) begin
      failures++;
      $display("FAIL %h*%h=%h exp %h", x, z, y, ref_mul(x, z));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd0, 32'd12345);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'd7, 32'd7);
    check(32'h0001_0000, 32'h0001_0000);
    for (int n = 0; n < 300; n++) check($urandom, $urandom);
    for (int n = 0; n < 100; n++) check($urandom & 32'hFFFF, $urandom & 32'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
