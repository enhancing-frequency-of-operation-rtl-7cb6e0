// tb_alu: self-checking test of the ALU. Drives random and corner operands
// for every operation and compares r and z with a reference computed here.
module tb_alu;
  import sccpu_pkg::*;

  logic [31:0] a, b, r;
  logic [3:0]  aluc;
  logic        z;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .aluc, .r, .z);

  function automatic logic [31:0] ref_alu(logic [31:0] x, logic [31:0] y, logic [3:0] c);
    case (c)
      4'd1: return x + ~y + 32'd1;
      4'd2: return ~(~x | ~y);
      4'd3: return ~(~x & ~y);
      4'd4: begin
        logic [31:0] t = y;
        for (int i = 0; i < int'(x[4:0]); i++) t = {t[30:0], 1'b0};
        return t;
      end
      4'd5: return y * 32'h10000;
      default: return x + y;
    endcase
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] y, logic [3:0] c);
    logic [31:0] e;
    a = x; b = y; aluc = c;
    #1;
    e = ref_alu(x, y, c);
    checks++;
    if (r !== e || z !== (e == 0)) begin
      failures++;
      $display("FAIL aluc=%0d a=%h b=%h r=%h z=%b expected %h", c, x, y, r, z, e);
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
    for (int c = 0; c < 16; c++) begin
      check(32'd0, 32'd0, 4'(c));
      check(32'hffff_ffff, 32'd1, 4'(c));
      check(32'd5, 32'd5, 4'(c));
      check(32'h0000_0002, 32'h0000_0030, 4'(c));
      for (int i = 0; i < 200; i++) check($urandom, $urandom, 4'(c));
    end
    // Figure example: sll by 2 of 0x30 gives 0xc0.
    check(32'd2, 32'h30, 4'(ALU_SLL));
    if (r != 32'hc0) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
