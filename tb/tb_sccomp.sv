// tb_sccomp: end-to-end test of the complete computer with a directed
// program that uses every supported instruction and every next-PC source:
// arithmetic and logic, shift, immediate forms, load upper, store and load,
// beq and bne both taken and not taken, a counted loop, j, jal with its link
// register, jr back through it, and a reset in the middle of a run. The
// program also runs on the reference model of sccpu_tb_pkg; PC and stores
// are compared every cycle, registers and memory at the end, plus a few
// values worked out by hand. Each mechanism is counted from the computer's
// own signals and a mechanism that never happened counts as a failure.
module tb_sccomp;
  import sccpu_tb_pkg::*;

  localparam int N = 26;
  localparam logic [31:0] P [N] = '{
    lui_(1, 16'h0000),        // 00
    ori_(1, 1, 16'h0010),     // 04  $1 = 16
    addi_(2, 0, 5),           // 08  $2 = 5
    addi_(3, 0, -1),          // 0c  $3 = -1
    sub_(4, 2, 3),            // 10  $4 = 6
    and_(5, 4, 2),            // 14  $5 = 4
    or_(6, 4, 2),             // 18  $6 = 7
    sll_(7, 6, 3),            // 1c  $7 = 56
    sw_(7, 4, 1),             // 20  mem[20] = 56
    lw_(8, 4, 1),             // 24  $8 = 56
    beq_(8, 7, 1),            // 28  taken -> 30
    addi_(9, 0, 99),          // 2c  skipped
    bne_(8, 7, 1),            // 30  not taken
    add_(10, 8, 8),           // 34  $10 = 112
    jal_(32'h44),             // 38  $31 = 3c
    beq_(0, 0, 3),            // 3c  taken -> 4c
    addi_(11, 0, 1),          // 40  skipped
    addi_(12, 0, 16'h77),     // 44  $12 = 0x77
    jr_(31),                  // 48  -> 3c
    lui_(13, 16'h1234),       // 4c  $13 = 0x12340000
    addi_(2, 2, -1),          // 50  loop: $2 -= 1
    bne_(2, 0, -2),           // 54  back to 50 until $2 == 0
    j_(32'h60),               // 58
    addi_(14, 0, 1),          // 5c  skipped
    sw_(10, 0, 0),            // 60  mem[0] = 112
    j_(32'h64)                // 64  halt loop
  };

  logic        clk = 0, clrn;
  logic [31:0] pc, inst, r, mem_do;
  logic        m2reg, wmem;
  arch_state_t ref_s;
  int checks = 0, failures = 0;
  int n_branch_taken = 0, n_branch_not = 0, n_jump = 0, n_link = 0, n_jr = 0;
  int n_load = 0, n_store = 0, n_shift = 0, n_reset = 0, n_cycles = 0;

  sccomp #(.PROG_LEN(N), .PROG(P)) dut (.clk, .clrn, .pc, .inst, .r, .mem_do, .m2reg, .wmem);

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s = %h, expected %h", what, got, want); end
  endtask

  // Count mechanisms from the computer's own signals at each rising edge.
  always @(posedge clk) if (!clrn) begin
    n_cycles++;
    if (m2reg) n_load++;
    if (wmem)  n_store++;
    if (inst[31:26] == 6'h00 && inst[5:0] == 6'h00 && inst[10:6] != 0) n_shift++;
    if (inst[31:26] inside {6'h04, 6'h05}) begin
      if (dut.cpu.pcsrc == 2'd1) n_branch_taken++; else n_branch_not++;
    end
    if (dut.cpu.pcsrc == 2'd3) n_jump++;
    if (dut.cpu.jal) n_link++;
    if (dut.cpu.pcsrc == 2'd2) n_jr++;
  end

  task automatic run(int cycles, string tag);
    logic        we;
    logic [31:0] wa, wd;
    for (int c = 0; c < cycles; c++) begin
      check($sformatf("%s pc @%0d", tag, c), pc, ref_s.pc);
      void'(step(ref_s, P[ref_s.pc[31:2] < N ? ref_s.pc[31:2] : 0], we, wa, wd));
      check($sformatf("%s wmem @%0d", tag, c), 32'(wmem), 32'(we));
      if (we) begin
        check("store address", r, wa);
        check("store data", dut.cpu.data, wd);
      end
      @(posedge clk); #1;
    end
  endtask

  task automatic do_reset();
    clrn = 1;
    @(posedge clk); #1;
    clrn = 0;
    n_reset++;
    ref_s.pc = 0;
    foreach (ref_s.gpr[i]) ref_s.gpr[i] = 0;
  endtask

  initial begin
    do_reset();
    // The store at 0x20 precedes every load, so memory starts out unknown.
    foreach (ref_s.dmem[i]) ref_s.dmem[i] = dut.dmem.ram[i];
    run(9, "first");       // partway, then reset mid-run
    do_reset();
    foreach (ref_s.dmem[i]) ref_s.dmem[i] = dut.dmem.ram[i];
    run(45, "full");
    // Architectural state against the reference model ...
    for (int i = 1; i < 32; i++) check($sformatf("r%0d", i), dut.cpu.rf.regs[i], ref_s.gpr[i]);
    for (int i = 0; i < 32; i++) check($sformatf("mem[%0d]", i), dut.dmem.ram[i], ref_s.dmem[i]);
    // ... and against values worked out by hand.
    check("halt pc", pc, 32'h64);
    check("$2", dut.cpu.rf.regs[2], 32'h0);
    check("$4", dut.cpu.rf.regs[4], 32'd6);
    check("$5", dut.cpu.rf.regs[5], 32'd4);
    check("$6", dut.cpu.rf.regs[6], 32'd7);
    check("$7", dut.cpu.rf.regs[7], 32'd56);
    check("$8", dut.cpu.rf.regs[8], 32'd56);
    check("$9", dut.cpu.rf.regs[9], 32'd0);
    check("$10", dut.cpu.rf.regs[10], 32'd112);
    check("$11", dut.cpu.rf.regs[11], 32'd0);
    check("$12", dut.cpu.rf.regs[12], 32'h77);
    check("$13", dut.cpu.rf.regs[13], 32'h12340000);
    check("$14", dut.cpu.rf.regs[14], 32'd0);
    check("$31", dut.cpu.rf.regs[31], 32'h3c);
    check("mem[5]", dut.dmem.ram[5], 32'd56);
    check("mem[0]", dut.dmem.ram[0], 32'd112);
    $display("cycles %0d: taken branches %0d, untaken %0d, jumps %0d, links %0d, jr %0d, loads %0d, stores %0d, shifts %0d, resets %0d",
             n_cycles, n_branch_taken, n_branch_not, n_jump, n_link, n_jr, n_load, n_store, n_shift, n_reset);
    checks++; if (n_branch_taken == 0) begin failures++; $display("FAIL no taken branch"); end
    checks++; if (n_branch_not == 0)   begin failures++; $display("FAIL no untaken branch"); end
    checks++; if (n_jump == 0)         begin failures++; $display("FAIL no jump"); end
    checks++; if (n_link == 0)         begin failures++; $display("FAIL no jal link"); end
    checks++; if (n_jr == 0)           begin failures++; $display("FAIL no jr"); end
    checks++; if (n_load == 0)         begin failures++; $display("FAIL no load"); end
    checks++; if (n_store == 0)        begin failures++; $display("FAIL no store"); end
    checks++; if (n_shift == 0)        begin failures++; $display("FAIL no shift"); end
    checks++; if (n_reset < 2)         begin failures++; $display("FAIL no mid-run reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
