// tb_inst_mem: self-checking test of the instruction ROM. Checks the default
// program word by word against the instruction codes of the demonstration
// waveforms, nops beyond it, wrap-around, and a second ROM built from a
// different program parameter.
module tb_inst_mem;
  logic [31:0] a, q, q2;
  int checks = 0, failures = 0;

  localparam logic [31:0] FIG [13] = '{
    32'h3c010000, 32'h20420030, 32'h20250020, 32'h00021080, 32'hac050000,
    32'h0c000007, 32'h00000000, 32'h00421020, 32'h8c040000, 32'h34420032,
    32'hac040004, 32'h00000000, 32'h00000000};
  localparam logic [31:0] ALT [3] = '{32'h11111111, 32'h22222222, 32'h33333333};

  inst_mem dut (.a, .do_(q));
  inst_mem #(.WORDS(4), .PROG_LEN(3), .PROG(ALT)) rom_small (.a, .do_(q2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = 32'(i * 4);
      #1;
      checks++;
      if (q !== (i < 13 ? FIG[i] : 32'h0)) begin failures++; $display("FAIL word %0d %h", i, q); end
      checks++;
      if (q2 !== ((i % 4) < 3 ? ALT[i % 4] : 32'h0)) begin failures++; $display("FAIL small %0d %h", i, q2); end
    end
    // Byte offset bits are ignored; the ROM wraps at 64 words.
    a = 32'h0000_0107; #1; checks++;
    if (q !== FIG[1]) begin failures++; $display("FAIL wrap %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
