// tb_nisc_alu: self-checking test of the ALU against a reference model
// written in the testbench, on directed corner values and random operands
// for every operation.
module tb_nisc_alu;
  import nisc_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  nisc_alu #(.WIDTH(32)) dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] r;
    int s = int'(z[4:0]);
    case (o)
      ALU_ADD:   r = x + z;
      ALU_SUB:   r = x + (~z) + 32'd1;
      ALU_SLL:   begin r = x; repeat (s) r = {r[30:0], 1'b0}; end
      ALU_SRL:   begin r = x; repeat (s) r = {1'b0, r[31:1]}; end
      ALU_SRA:   begin r = x; repeat (s) r = {r[31], r[31:1]}; end
      ALU_AND:   for (int i = 0; i < 32; i++) r[i] = x[i] && z[i];
      ALU_OR:    for (int i = 0; i < 32; i++) r[i] = x[i] || z[i];
      ALU_XOR:   for (int i = 0; i < 32; i++) r[i] = x[i] != z[i];
      ALU_NOR:   for (int i = 0; i < 32; i++) r[i] = !(x[i] || z[i]);
      ALU_PASSB: r = z;
      default:   r = '0;
    endcase
    return r;
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, e);
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
    alu_op_e o;
    // directed
    check(ALU_ADD, 32'hFFFF_FFFF, 32'd1);
    check(ALU_SUB, 32'd0, 32'd1);
    check(ALU_SRA, 32'h8000_0000, 32'd31);
    check(ALU_SRL, 32'h8000_0000, 32'd31);
    check(ALU_SLL, 32'd1, 32'd31);
    check(ALU_SRL, 32'd200, 32'd1);          // division by 2 as a shift
    check(ALU_NOR, 32'h0F0F_0000, 32'h00FF_0000);
    // random sweep of every operation
    for (int n = 0; n < 400; n++) begin
      o = alu_op_e'(n % 10);
      check(o, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
