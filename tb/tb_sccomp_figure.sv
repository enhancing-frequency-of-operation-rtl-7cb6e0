// tb_sccomp_figure: runs the complete computer with every parameter at its
// default, i.e. with the built-in demonstration program, and checks cycle by
// cycle the values of the published simulation waveforms: pc, inst, the ALU
// result r, m2reg and wmem, the loaded word at the lw, and the architectural
// state at the end. One instruction completes per clock cycle.
module tb_sccomp_figure;
  logic        clk = 0, clrn;
  logic [31:0] pc, inst, r, mem_do;
  logic        m2reg, wmem;
  int checks = 0, failures = 0;

  sccomp dut (.clk, .clrn, .pc, .inst, .r, .mem_do, .m2reg, .wmem);

  always #20 clk = ~clk;

  // Values read off the published waveforms, one column per cycle.
  localparam logic [31:0] EXP_PC [12] = '{
    32'h00, 32'h04, 32'h08, 32'h0c, 32'h10, 32'h14, 32'h1c, 32'h20, 32'h24, 32'h28, 32'h2c, 32'h30};
  localparam logic [31:0] EXP_INST [12] = '{
    32'h3c010000, 32'h20420030, 32'h20250020, 32'h00021080, 32'hac050000, 32'h0c000007,
    32'h00421020, 32'h8c040000, 32'h34420032, 32'hac040004, 32'h00000000, 32'h00000000};
  localparam logic [31:0] EXP_R [12] = '{
    32'h000, 32'h030, 32'h020, 32'h0c0, 32'h000, 32'h000, 32'h180, 32'h000, 32'h1b2, 32'h004, 32'h000, 32'h000};
  localparam logic [11:0] EXP_M2REG = 12'b0000_1000_0000;  // bit i = cycle i
  localparam logic [11:0] EXP_WMEM  = 12'b0010_0001_0000;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, want);
    end
  endtask

  initial begin
    #(40 * 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clrn = 1;
    @(posedge clk); #1;
    clrn = 0;
    for (int i = 0; i < 12; i++) begin
      expect_eq($sformatf("pc[%0d]", i), pc, EXP_PC[i]);
      expect_eq($sformatf("inst[%0d]", i), inst, EXP_INST[i]);
      expect_eq($sformatf("r[%0d]", i), r, EXP_R[i]);
      expect_eq($sformatf("m2reg[%0d]", i), 32'(m2reg), 32'(EXP_M2REG[i]));
      expect_eq($sformatf("wmem[%0d]", i), 32'(wmem), 32'(EXP_WMEM[i]));
      // The lw at 0x20 reads back the 0x20 stored by the sw at 0x10.
      if (EXP_PC[i] == 32'h20) expect_eq("loaded word", mem_do, 32'h20);
      @(posedge clk); #1;
    end
    expect_eq("$1", dut.cpu.rf.regs[1], 32'h0);
    expect_eq("$2", dut.cpu.rf.regs[2], 32'h1b2);
    expect_eq("$4", dut.cpu.rf.regs[4], 32'h20);
    expect_eq("$5", dut.cpu.rf.regs[5], 32'h20);
    expect_eq("$31", dut.cpu.rf.regs[31], 32'h18);
    expect_eq("mem[0]", dut.dmem.ram[0], 32'h20);
    expect_eq("mem[1]", dut.dmem.ram[1], 32'h20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
