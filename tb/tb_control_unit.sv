// tb_control_unit: self-checking test of the instruction decoder. For every
// supported instruction, with z at 0 and at 1, the full control word is
// compared with an expected table written out here field by field; unknown
// encodings must write neither registers nor memory and select PC+4.
module tb_control_unit;
  logic [5:0] op, func;
  logic       z;
  logic       wreg, regrt, jal, m2reg, shift, aluimm, sext, wmem;
  logic [3:0] aluc;
  logic [1:0] pcsrc;
  int checks = 0, failures = 0;

  control_unit dut (.op, .func, .z, .wreg, .regrt, .jal, .m2reg, .shift,
                    .aluimm, .sext, .aluc, .wmem, .pcsrc);

  // Expected: {wreg,regrt,jal,m2reg,shift,aluimm,sext,wmem} aluc pcsrc
  task automatic expect_ctl(string name, logic [5:0] o, logic [5:0] f, logic zz,
                            logic [7:0] flags, logic [3:0] c, logic [1:0] p, bit care_aluc);
    op = o; func = f; z = zz;
    #1;
    checks++;
    if ({wreg, regrt, jal, m2reg, shift, aluimm, sext, wmem} !== flags ||
        (care_aluc && aluc !== c) || pcsrc !== p) begin
      failures++;
      $display("FAIL %s z=%b: flags=%b aluc=%0d pcsrc=%0d", name, zz,
               {wreg, regrt, jal, m2reg, shift, aluimm, sext, wmem}, aluc, pcsrc);
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
    for (int zz = 0; zz < 2; zz++) begin
      //                                      wr rt jl m2 sh im sx wm
      expect_ctl("add",  6'h00, 6'h20, 1'(zz), 8'b1_0_0_0_0_0_0_0, 4'd0, 2'd0, 1);
      expect_ctl("sub",  6'h00, 6'h22, 1'(zz), 8'b1_0_0_0_0_0_0_0, 4'd1, 2'd0, 1);
      expect_ctl("and",  6'h00, 6'h24, 1'(zz), 8'b1_0_0_0_0_0_0_0, 4'd2, 2'd0, 1);
      expect_ctl("or",   6'h00, 6'h25, 1'(zz), 8'b1_0_0_0_0_0_0_0, 4'd3, 2'd0, 1);
      expect_ctl("sll",  6'h00, 6'h00, 1'(zz), 8'b1_0_0_0_1_0_0_0, 4'd4, 2'd0, 1);
      expect_ctl("jr",   6'h00, 6'h08, 1'(zz), 8'b0_0_0_0_0_0_0_0, 4'd0, 2'd2, 0);
      expect_ctl("addi", 6'h08, 6'($urandom), 1'(zz), 8'b1_1_0_0_0_1_1_0, 4'd0, 2'd0, 1);
      expect_ctl("ori",  6'h0d, 6'($urandom), 1'(zz), 8'b1_1_0_0_0_1_0_0, 4'd3, 2'd0, 1);
      expect_ctl("lui",  6'h0f, 6'($urandom), 1'(zz), 8'b1_1_0_0_0_1_0_0, 4'd5, 2'd0, 1);
      expect_ctl("lw",   6'h23, 6'($urandom), 1'(zz), 8'b1_1_0_1_0_1_1_0, 4'd0, 2'd0, 1);
      expect_ctl("sw",   6'h2b, 6'($urandom), 1'(zz), 8'b0_0_0_0_0_1_1_1, 4'd0, 2'd0, 1);
      expect_ctl("beq",  6'h04, 6'($urandom), 1'(zz), 8'b0_0_0_0_0_0_1_0, 4'd1, zz ? 2'd1 : 2'd0, 1);
      expect_ctl("bne",  6'h05, 6'($urandom), 1'(zz), 8'b0_0_0_0_0_0_1_0, 4'd1, zz ? 2'd0 : 2'd1, 1);
      expect_ctl("j",    6'h02, 6'($urandom), 1'(zz), 8'b0_0_0_0_0_0_0_0, 4'd0, 2'd3, 0);
      expect_ctl("jal",  6'h03, 6'($urandom), 1'(zz), 8'b1_0_1_0_0_0_0_0, 4'd0, 2'd3, 0);
    end
    // Unsupported encodings do nothing.
    expect_ctl("xor",  6'h00, 6'h26, 1'b0, 8'b0, 4'd0, 2'd0, 0);
    expect_ctl("srl",  6'h00, 6'h02, 1'b1, 8'b0, 4'd0, 2'd0, 0);
    expect_ctl("lb",   6'h20, 6'h00, 1'b0, 8'b0, 4'd0, 2'd0, 0);
    expect_ctl("andi", 6'h0c, 6'h00, 1'b0, 8'b0, 4'd0, 2'd0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
