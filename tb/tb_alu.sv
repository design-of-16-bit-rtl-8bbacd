// tb_alu - self-checking test of the ALU.
// Checks the worked examples of the published instruction table (16-bit
// binary values), then random operands for every operation against an
// independent reference, and that a disabled ALU outputs 0.
module tb_alu;
  import risc16_pkg::*;
  int checks = 0, failures = 0;
  logic en;
  alu_op_e op;
  logic [15:0] a, b, y;

  alu dut (.en, .op, .a, .b, .y);

  function automatic logic [15:0] ref_alu(alu_op_e o, logic [15:0] x, logic [15:0] z);
    int unsigned xi = int'(x), zi = int'(z);
    case (o)
      ALU_ADD: return 16'((xi + zi) % 65536);
      ALU_SUB: return 16'((xi + 65536 - zi) % 65536);
      ALU_INC: return 16'((xi + 1) % 65536);
      ALU_DEC: return 16'((xi + 65535) % 65536);
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_NOT: return 16'hFFFF - x;
      ALU_PASS: return x;
      default: return 16'h0;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [15:0] x, logic [15:0] z, logic e, logic [15:0] exp);
    en = e; op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s en=%0b a=%h b=%h y=%h exp=%h", o.name(), e, x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Table examples: NOT 0110000000000000 -> 1001111111111111,
    // ADD 10 + 110000000000000, SUB x - x = 0.
    check(ALU_NOT, 16'b0110000000000000, 16'h0, 1, 16'b1001111111111111);
    check(ALU_ADD, 16'b0000000000000010, 16'b0110000000000000, 1, 16'b0110000000000010);
    check(ALU_SUB, 16'b0110000000000100, 16'b0110000000000000, 1, 16'b0000000000000100);
    check(ALU_INC, 16'hFFFF, 16'h0, 1, 16'h0000);
    check(ALU_DEC, 16'h0000, 16'h0, 1, 16'hFFFF);
    check(ALU_ZERO, 16'h1234, 16'h5678, 1, 16'h0000);
    for (int i = 0; i < 2000; i++) begin
      alu_op_e o;
      logic [15:0] x, z;
      o = alu_op_e'($urandom_range(0, 9));
      x = 16'($urandom);
      z = 16'($urandom);
      check(o, x, z, 1, ref_alu(o, x, z));
      if (i % 10 == 0) check(o, x, z, 0, 16'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
