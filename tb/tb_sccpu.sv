// tb_sccpu: self-checking random test of the CPU core. The testbench plays
// both memories: it returns prog[pc[7:2]] as the instruction and keeps a
// 32-word data memory written at the rising edge when wmem is high. Random
// programs of the supported instructions run on the core and, in lock step,
// on the reference model of sccpu_tb_pkg; every cycle the PC, and every store
// its address and data, are compared, and after each program every register
// and memory word. One instruction must complete per clock cycle.
module tb_sccpu;
  import sccpu_tb_pkg::*;

  localparam int NPROGS = 12;
  localparam int NCYCLES = 1500;

  logic        clk = 0, clrn;
  logic [31:0] inst, mem, pc, alu, data;
  logic        wmem, m2reg;
  logic [31:0] prog [64];
  logic [31:0] tbmem [32];
  arch_state_t ref_s;
  int checks = 0, failures = 0;
  int kind_count [K_NUM];

  sccpu dut (.clk, .clrn, .inst, .mem, .pc, .alu, .data, .wmem, .m2reg);

  always #5 clk = ~clk;

  assign inst = prog[pc[7:2]];
  assign mem  = tbmem[alu[6:2]];
  always @(posedge clk) if (wmem) tbmem[alu[6:2]] <= data;

  initial begin
    #((NPROGS + 1) * (NCYCLES + 10) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rreg();
    return int'($urandom_range(0, 7));
  endfunction

  function automatic logic [31:0] rand_inst();
    int off = int'($urandom_range(0, 31)) * 4;
    case ($urandom_range(0, 16))
      0:  return add_(rreg(), rreg(), rreg());
      1:  return sub_(rreg(), rreg(), rreg());
      2:  return and_(rreg(), rreg(), rreg());
      3:  return or_(rreg(), rreg(), rreg());
      4:  return sll_(rreg(), rreg(), int'($urandom_range(0, 31)));
      5:  return addi_(rreg(), rreg(), int'($urandom));
      6:  return ori_(rreg(), rreg(), int'($urandom));
      7:  return lui_(rreg(), int'($urandom));
      8:  return lw_(rreg(), off, 0);
      9:  return sw_(rreg(), off, 0);
      10: return lw_(rreg(), int'($urandom), rreg());
      11: return sw_(rreg(), int'($urandom), rreg());
      12: return beq_(rreg(), rreg(), int'($urandom_range(0, 6)) - 3);
      13: return bne_(rreg(), rreg(), int'($urandom_range(0, 6)) - 3);
      14: return ($urandom_range(0, 3) == 0) ? jr_(rreg()) : j_(int'($urandom_range(0, 63)) * 4);
      15: return jal_(int'($urandom_range(0, 63)) * 4);
      default: return $urandom;  // arbitrary encoding
    endcase
  endfunction

  initial begin
    logic        we;
    logic [31:0] wa, wd;
    kind_e       k;
    foreach (kind_count[i]) kind_count[i] = 0;
    for (int p = 0; p < NPROGS; p++) begin
      // Reset first: during the reset cycle the old instruction may still
      // store, so the memories are filled only afterwards.
      @(negedge clk); clrn = 1;
      @(negedge clk); clrn = 0;
      foreach (prog[i]) prog[i] = rand_inst();
      foreach (tbmem[i]) begin tbmem[i] = $urandom; ref_s.dmem[i] = tbmem[i]; end
      foreach (ref_s.gpr[i]) ref_s.gpr[i] = 0;
      ref_s.pc = 0;
      for (int c = 0; c < NCYCLES; c++) begin
        #1;
        checks++;
        if (pc !== ref_s.pc) begin
          failures++;
          $display("FAIL prog %0d cycle %0d: pc %h expected %h", p, c, pc, ref_s.pc);
          ref_s.pc = pc;  // resynchronise to keep the report short
        end
        k = step(ref_s, prog[ref_s.pc[7:2]], we, wa, wd);
        kind_count[k]++;
        checks++;
        if (wmem !== we || (we && (alu[6:2] !== wa[6:2] || data !== wd))) begin
          failures++;
          $display("FAIL prog %0d cycle %0d: store wmem=%b a=%h d=%h expected %b %h %h",
                   p, c, wmem, alu, data, we, wa, wd);
        end
        @(negedge clk);
      end
      for (int i = 0; i < 32; i++) begin
        checks += 2;
        if (dut.rf.regs[i] !== ref_s.gpr[i] && i != 0) begin
          failures++; $display("FAIL prog %0d r%0d=%h expected %h", p, i, dut.rf.regs[i], ref_s.gpr[i]);
        end
        if (tbmem[i] !== ref_s.dmem[i]) begin
          failures++; $display("FAIL prog %0d mem[%0d]=%h expected %h", p, i, tbmem[i], ref_s.dmem[i]);
        end
      end
    end
    for (int i = 0; i < K_OTHER; i++) begin
      $display("executed %s: %0d", kind_name(kind_e'(i)), kind_count[i]);
      checks++;
      if (kind_count[i] == 0) begin failures++; $display("FAIL never executed %s", kind_name(kind_e'(i))); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
