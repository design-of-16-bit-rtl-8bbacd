// tb_program_counter - self-checking test of the program counter:
// reset to 0, increment, load, load-over-increment priority, wrap at 2^16.
module tb_program_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, inc = 0, load = 0;
  logic [15:0] d = 0, q;
  int unsigned model;

  program_counter dut (.clk, .rst_n, .inc, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    #12;
    checks++; if (q !== 16'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      inc  = ($urandom_range(0, 3) != 0);
      load = ($urandom_range(0, 7) == 0);
      d    = (i == 500) ? 16'hFFFE : 16'($urandom);
      if (i == 500) begin load = 1; end
      @(posedge clk); #1;
      if (load)     model = int'(d);
      else if (inc) model = (model + 1) % 65536;
      checks++;
      if (q !== 16'(model)) begin
        failures++;
        $display("FAIL i=%0d q=%h exp=%h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
