// tb_instruction_register - self-checking test of the instruction register:
// resets to the NOP word, loads on load only, and splits the word into
// opcode [15:11], DST [10:8], SRC1 [7:5], SRC2 [4:2].
module tb_instruction_register;
  import risc16_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  word_t d = 0, held = 0;
  instr_t q;

  instruction_register dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  task automatic chk(word_t w);
    checks++;
    if (q.op !== w[15:11] || q.dst !== w[10:8] || q.src1 !== w[7:5] || q.src2 !== w[4:2]) begin
      failures++;
      $display("FAIL q=%h exp=%h", q, w);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 chk(16'h0);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 1) == 1);
      d    = 16'($urandom);
      @(posedge clk); #1;
      if (load) held = d;
      chk(held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
