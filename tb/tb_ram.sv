// tb_ram - self-checking test of the shared RAM at its full 64K-word size:
// random writes against a reference array, reads are asynchronous, and
// writes happen only with we.
module tb_ram;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [15:0] addr = 0, wdata = 0, rdata;
  logic [15:0] model [int];

  ram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill a set of addresses spread over the space, incl. both ends.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr  = (i == 0) ? 16'h0000 : (i == 1) ? 16'hFFFF : 16'($urandom);
      wdata = 16'($urandom);
      we    = 1;
      model[int'(addr)] = wdata;
      @(posedge clk); #1;
      we = 0;
      checks++;
      if (rdata !== wdata) begin failures++; $display("FAIL wr %h", addr); end
    end
    // Read back without writing; we low must not change anything.
    foreach (model[k]) begin
      @(negedge clk);
      addr  = 16'(k);
      wdata = ~model[k];
      we    = 0;
      #1;
      checks++;
      if (rdata !== model[k]) begin
        failures++;
        $display("FAIL rd addr=%h got=%h exp=%h", addr, rdata, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
