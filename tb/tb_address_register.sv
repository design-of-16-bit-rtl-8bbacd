// tb_address_register - self-checking test of the address_register: resets to 0, takes d
// only when load is high, holds otherwise.
module tb_address_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] d = 0, q, held = 0;

  address_register dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++; if (q !== 16'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 1) == 1);
      d    = 16'($urandom);
      @(posedge clk); #1;
      if (load) held = d;
      checks++;
      if (q !== held) begin
        failures++;
        $display("FAIL i=%0d q=%h exp=%h", i, q, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
