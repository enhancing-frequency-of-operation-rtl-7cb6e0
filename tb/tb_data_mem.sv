// tb_data_mem: self-checking test of the data RAM. Random writes and reads
// against a shadow array; checks that a write lands at the clock edge and
// not before, that we low leaves memory unchanged, and that reads are
// combinational.
module tb_data_mem;
  logic        clk = 0, we;
  logic [31:0] a, di, q;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .a, .di, .we, .do_(q));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); a = 32'(i * 4); di = $urandom; model[i] = di;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) begin
      a = 32'(i * 4); #1; checks++;
      if (q !== model[i]) begin failures++; $display("FAIL init %0d", i); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); a = {25'($urandom), 5'($urandom), 2'b00}; di = $urandom;
      #1; checks++;
      if (q !== model[a[6:2]]) begin failures++; $display("FAIL before edge %h", a); end
      @(posedge clk); #1;
      if (we) model[a[6:2]] = di;
      checks++;
      if (q !== model[a[6:2]]) begin failures++; $display("FAIL after edge %h", a); end
      a = {25'($urandom), 5'($urandom), 2'b00}; #1; checks++;
      if (q !== model[a[6:2]]) begin failures++; $display("FAIL read %h", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
