// tb_register_file - self-checking test of the 8 x 16-bit register file:
// reset clears all registers, one write per clock, two independent
// asynchronous reads compared with a reference array.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] waddr = 0, raddr1 = 0, raddr2 = 0;
  logic [15:0] wdata = 0, rdata1, rdata2;
  logic [15:0] model [8];

  register_file dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr1, .rdata1, .raddr2, .rdata2);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    #12;
    for (int r = 0; r < 8; r++) begin
      raddr1 = 3'(r); #1;
      checks++; if (rdata1 !== 0) begin failures++; $display("FAIL reset r%0d", r); end
    end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we     = ($urandom_range(0, 1) == 1);
      waddr  = 3'($urandom);
      wdata  = 16'($urandom);
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      raddr1 = 3'($urandom);
      raddr2 = 3'($urandom);
      #1;
      checks++;
      if (rdata1 !== model[raddr1] || rdata2 !== model[raddr2]) begin
        failures++;
        $display("FAIL i=%0d r%0d=%h/%h r%0d=%h/%h", i, raddr1, rdata1, model[raddr1],
                 raddr2, rdata2, model[raddr2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
