// tb_regfile: self-checking test of the 32 x 32 register file. Random writes
// and reads against a shadow array; checks reset, r0 hard-wired to zero, the
// write enable and that a write becomes visible after the clock edge.
module tb_regfile;
  logic        clk = 0, rst, we;
  logic [4:0]  rna, rnb, wn;
  logic [31:0] d, qa, qb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .rna, .rnb, .wn, .d, .we, .qa, .qb);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check();
    for (int i = 0; i < 32; i++) begin
      rna = 5'(i); rnb = 5'(31 - i);
      #1;
      checks += 2;
      if (qa !== model[i])      begin failures++; $display("FAIL qa r%0d %h vs %h", i, qa, model[i]); end
      if (qb !== model[31 - i]) begin failures++; $display("FAIL qb r%0d %h vs %h", 31 - i, qb, model[31 - i]); end
    end
  endtask

  initial begin
    rst = 1; we = 0; wn = 0; d = 0; rna = 0; rnb = 0;
    foreach (model[i]) model[i] = '0;
    @(posedge clk); #1;
    rst = 0;
    read_check();
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      wn = 5'($urandom);
      d  = $urandom;
      rna = wn;
      #1;
      // Before the edge the old value must still be read.
      checks++;
      if (qa !== model[wn]) begin failures++; $display("FAIL early write r%0d", wn); end
      @(posedge clk); #1;
      if (we && wn != 0) model[wn] = d;
      rna = 5'($urandom); rnb = 5'($urandom);
      #1;
      checks += 2;
      if (qa !== model[rna]) begin failures++; $display("FAIL qa r%0d %h vs %h", rna, qa, model[rna]); end
      if (qb !== model[rnb]) begin failures++; $display("FAIL qb r%0d %h vs %h", rnb, qb, model[rnb]); end
    end
    we = 0;
    read_check();
    // Reset clears everything again.
    @(negedge clk); rst = 1; @(posedge clk); #1; rst = 0;
    foreach (model[i]) model[i] = '0;
    read_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
