// tb_mux4: self-checking test of the 4:1 multiplexer (next-PC select).
module tb_mux4;
  logic [31:0] d [4];
  logic [31:0] y;
  logic [1:0]  s;
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(32)) dut (.d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .s, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      foreach (d[k]) d[k] = $urandom;
      s = 2'(i);
      #1;
      checks++;
      if (y !== d[s]) begin failures++; $display("FAIL s=%0d y=%h", s, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
