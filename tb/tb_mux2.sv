// tb_mux2: self-checking test of the 2:1 multiplexer at widths 32 and 5.
module tb_mux2;
  logic [31:0] a0, a1, ay;
  logic [4:0]  b0, b1, by;
  logic        s;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) m32 (.d0(a0), .d1(a1), .s, .y(ay));
  mux2 #(.WIDTH(5))  m5  (.d0(b0), .d1(b1), .s, .y(by));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a0 = $urandom; a1 = $urandom; b0 = 5'($urandom); b1 = 5'($urandom);
      s = 1'(i);
      #1;
      checks += 2;
      if (ay !== (s ? a1 : a0)) begin failures++; $display("FAIL 32 s=%b", s); end
      if (by !== (s ? b1 : b0)) begin failures++; $display("FAIL 5 s=%b", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
