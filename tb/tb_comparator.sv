// tb_comparator - self-checking test of the comparator and its flags.
// Random and equal operand pairs; flags must change only when en is high.
module tb_comparator;
  import risc16_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] a = 0, b = 0;
  flags_t flags, exp;

  comparator dut (.clk, .rst_n, .en, .a, .b, .flags);

  always #5 clk = ~clk;

  task automatic chk(string what);
    checks++;
    if (flags !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h flags=%b exp=%b", what, a, b, flags, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp = '0;
    #12 chk("reset");
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a  = 16'($urandom);
      b  = (i % 4 == 0) ? a : 16'($urandom);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) begin
        exp.eq = (int'(a) == int'(b));
        exp.gt = (int'(a) >  int'(b));
        exp.lt = (int'(a) <  int'(b));
      end
      chk("cmp");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
