// tb_tristate_reg - self-checking test of the tri-state (store data) register:
// it holds the last loaded word and puts it on the bus only while oe is high.
module tb_tristate_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, oe = 0, bus_oe;
  logic [15:0] d = 0, bus, held = 0;

  tristate_reg dut (.clk, .rst_n, .load, .d, .oe, .bus, .bus_oe);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 1) == 1);
      d    = 16'($urandom);
      oe   = 0;
      @(posedge clk); #1;
      if (load) held = d;
      oe = ($urandom_range(0, 1) == 1);
      #1;
      checks++;
      if (bus_oe !== oe || bus !== (oe ? held : 16'h0)) begin
        failures++;
        $display("FAIL i=%0d oe=%b bus=%h exp=%h", i, oe, bus, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
