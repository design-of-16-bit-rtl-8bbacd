// tb_shifter - self-checking test of the one-place shifter.
// Checks the worked shift/rotate examples of the published instruction table,
// random words against a bit-by-bit reference, and the idle output.
module tb_shifter;
  import risc16_pkg::*;
  int checks = 0, failures = 0;
  logic en;
  shift_op_e op;
  logic [15:0] a, y;

  shifter dut (.en, .op, .a, .y);

  function automatic logic [15:0] ref_sh(shift_op_e o, logic [15:0] x);
    logic [15:0] r;
    for (int i = 0; i < 16; i++) begin
      case (o)
        SH_SHL: r[i] = (i == 0)  ? 1'b0  : x[i-1];
        SH_SHR: r[i] = (i == 15) ? 1'b0  : x[i+1];
        SH_ROL: r[i] = (i == 0)  ? x[15] : x[i-1];
        default: r[i] = (i == 15) ? x[0] : x[i+1];
      endcase
    end
    return r;
  endfunction

  task automatic check(shift_op_e o, logic [15:0] x, logic e, logic [15:0] exp);
    en = e; op = o; a = x;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%b y=%b exp=%b", o.name(), x, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(SH_SHL, 16'b0100000000000000, 1, 16'b1000000000000000);
    check(SH_ROL, 16'b1100000000000000, 1, 16'b1000000000000001);
    check(SH_ROR, 16'b0100000000000000, 1, 16'b0010000000000000);
    check(SH_SHR, 16'b1100000000000000, 1, 16'b0110000000000000);
    for (int i = 0; i < 1000; i++) begin
      shift_op_e o;
      logic [15:0] x;
      o = shift_op_e'($urandom_range(0, 3));
      x = 16'($urandom);
      check(o, x, 1, ref_sh(o, x));
      if (i % 10 == 0) check(o, x, 0, 16'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
