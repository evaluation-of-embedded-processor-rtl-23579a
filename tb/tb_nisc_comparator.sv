// tb_nisc_comparator: drives the comparator with every operand source,
// buses, constant and each forwarded unit output, and every comparison,
// and checks the status result against a reference model.
module tb_nisc_comparator;
  import nisc_pkg::*;

  cmp_op_e     op;
  cmp_src_e    asel, bsel;
  logic [31:0] bus1, bus2, imm;
  logic [31:0] fwd [N_FWD];
  logic        result;
  int checks = 0, failures = 0;

  nisc_comparator #(.WIDTH(32)) dut (
    .op(op), .a_sel(asel), .b_sel(bsel), .bus1(bus1), .bus2(bus2),
    .imm(imm), .fwd(fwd), .result(result));

  function automatic logic [31:0] src(cmp_src_e s);
    case (s)
      CS_B1:  return bus1;
      CS_B2:  return bus2;
      CS_IMM: return imm;
      default: return fwd[int'(s) - 3];
    endcase
  endfunction

  function automatic logic ref_cmp(cmp_op_e o, logic [31:0] x, logic [31:0] z);
    logic signed [32:0] sx = {x[31], x}, sz = {z[31], z};
    logic [32:0] ux = {1'b0, x}, uz = {1'b0, z};
    logic [32:0] ds = sx - sz, du = ux - uz;
    case (o)
      CMP_EQ:  return ux == uz;
      CMP_NE:  return ux != uz;
      CMP_LT:  return ds[32];
      CMP_GE:  return !ds[32];
      CMP_LTU: return du[32];
      CMP_GEU: return !du[32];
      default: return 1'b0;
    endcase
  endfunction

  task automatic check(cmp_op_e o, cmp_src_e sa, cmp_src_e sb);
    logic e;
    op = o; asel = sa; bsel = sb; #1;
    e = ref_cmp(o, src(sa), src(sb));
    checks++;
    if (result !== e) begin
      failures++;
      $display("FAIL %s %s %s got %b exp %b", o.name(), sa.name(), sb.name(), result, e);
    end
  endtask

  task automatic randomize_inputs();
    // small values so equality occurs often
    bus1 = $urandom % 8; bus2 = $urandom % 8; imm = $urandom % 8;
    if ($urandom % 4 == 0) bus1 = -bus1;
    for (int i = 0; i < int'(N_FWD); i++) begin
      fwd[i] = $urandom % 8;
      if ($urandom % 4 == 0) fwd[i] = -fwd[i];
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
    // each source paired against distinct-valued others
    for (int n = 0; n < 60; n++) begin
      for (int s = 0; s <= 8; s++) begin
        bus1 = 32'd100; bus2 = 32'd200; imm = 32'd300;
        for (int i = 0; i < int'(N_FWD); i++) fwd[i] = 32'd400 + 32'(i);
        randomize_inputs();
        check(cmp_op_e'(n % 6), cmp_src_e'(s), cmp_src_e'($urandom % 9));
        check(cmp_op_e'(n % 6), cmp_src_e'($urandom % 9), cmp_src_e'(s));
      end
    end
    // unique values: a source mix-up must show as inequality
    bus1 = 32'd1; bus2 = 32'd2; imm = 32'd3;
    for (int i = 0; i < int'(N_FWD); i++) fwd[i] = 32'd10 + 32'(i);
    for (int s = 0; s <= 8; s++) begin
      check(CMP_EQ, cmp_src_e'(s), cmp_src_e'(s));
      for (int t = 0; t <= 8; t++) check(CMP_LTU, cmp_src_e'(s), cmp_src_e'(t));
    end
    // signed versus unsigned
    bus1 = 32'hFFFF_FFFF; bus2 = 32'd1;
    check(CMP_LT, CS_B1, CS_B2);
    check(CMP_LTU, CS_B1, CS_B2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
