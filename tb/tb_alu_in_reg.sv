// tb_alu_in_reg - self-checking test of the input ALU register: both operands
// reset to 0, load together on load, hold otherwise.
module tb_alu_in_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] a_d = 0, b_d = 0, a_q, b_q, ha = 0, hb = 0;

  alu_in_reg dut (.clk, .rst_n, .load, .a_d, .b_d, .a_q, .b_q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++; if (a_q !== 0 || b_q !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 1) == 1);
      a_d  = 16'($urandom);
      b_d  = 16'($urandom);
      @(posedge clk); #1;
      if (load) begin ha = a_d; hb = b_d; end
      checks++;
      if (a_q !== ha || b_q !== hb) begin
        failures++;
        $display("FAIL i=%0d a=%h/%h b=%h/%h", i, a_q, ha, b_q, hb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
