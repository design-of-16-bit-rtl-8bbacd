// tb_control_unit - self-checking test of the sequencer/decoder.
// For every opcode and every flag combination it feeds the instruction
// register value, steps through fetch, decode and execute and compares the
// control bundle with an expectation table written here, then checks the
// write-back in the following fetch, the fixed three-clock instruction time,
// HLT, and that nothing moves while run is low.
module tb_control_unit;
  import risc16_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  instr_t ir;
  flags_t flags;
  ctl_t ctl;
  logic halted, retire, cond_true, cond_false;

  control_unit dut (.clk, .rst_n, .run, .ir, .flags, .ctl, .halted, .retire,
                    .cond_true, .cond_false);

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  task automatic expect1(logic got, logic exp, string s);
    checks++;
    if (got !== exp) fail($sformatf("%s got=%b exp=%b (op=%b flags=%b)", s, got, exp, ir.op, flags));
  endtask

  // Expected behaviour of one opcode in its execute cycle.
  typedef struct {
    bit cond; bit alu; bit shf; bit cmp; bit ld; bit ldi; bit st; bit jmp; bit halt;
    alu_op_e aluop; shift_op_e shfop;
  } exp_t;

  function automatic exp_t decode_ref(logic [4:0] o, flags_t f);
    exp_t e;
    e = '{cond: 1'b1, aluop: ALU_PASS, shfop: SH_SHL, default: 1'b0};
    e.cond = 1;
    case (o)
      5'b01101: begin e.alu = 1; e.aluop = ALU_ADD; end
      5'b00111: begin e.alu = 1; e.aluop = ALU_INC; end
      5'b01000: begin e.alu = 1; e.aluop = ALU_DEC; end
      5'b01011: begin e.alu = 1; e.aluop = ALU_XOR; end
      5'b01001: begin e.alu = 1; e.aluop = ALU_AND; end
      5'b01110: begin e.alu = 1; e.aluop = ALU_SUB; end
      5'b01100: begin e.alu = 1; e.aluop = ALU_NOT; end
      5'b01010: begin e.alu = 1; e.aluop = ALU_OR;  end
      5'b11000: begin e.alu = 1; e.aluop = ALU_PASS; end
      5'b00110: begin e.alu = 1; e.aluop = ALU_ZERO; end
      5'b11010: begin e.shf = 1; e.shfop = SH_SHL; end
      5'b11011: begin e.shf = 1; e.shfop = SH_SHR; end
      5'b11100: begin e.shf = 1; e.shfop = SH_ROL; end
      5'b11101: begin e.shf = 1; e.shfop = SH_ROR; end
      5'b00001: e.ld = 1;
      5'b00010: e.st = 1;
      5'b00011: e.ldi = 1;
      5'b00100: e.jmp = 1;
      5'b00101: e.cmp = 1;
      5'b01111: e.halt = 1;
      5'b10000: begin e.cond = f.eq;  e.alu = 1; e.aluop = ALU_PASS; end
      5'b10001: begin e.cond = !f.eq; e.alu = 1; e.aluop = ALU_PASS; end
      5'b10010: begin e.cond = f.gt;  e.alu = 1; e.aluop = ALU_PASS; end
      5'b10011: begin e.cond = f.lt;  e.alu = 1; e.aluop = ALU_PASS; end
      5'b10110: begin e.cond = f.eq;  e.alu = 1; e.aluop = ALU_ADD; end
      5'b10100: begin e.cond = f.eq;  e.jmp = 1; end
      5'b10101: begin e.cond = !f.eq; e.jmp = 1; end
      default: ;
    endcase
    if (!e.cond) begin
      e.alu = 0; e.shf = 0; e.jmp = 0;
    end
    return e;
  endfunction

  bit [2:0] flag_set [4] = '{3'b000, 3'b001, 3'b010, 3'b100};
  int cyc = 0, last_retire = -1, n_cond_t = 0, n_cond_f = 0;
  always @(posedge clk) begin
    cyc++;
    if (retire) begin
      if (last_retire >= 0) begin
        checks++;
        if (cyc - last_retire != 3) fail($sformatf("instruction took %0d clocks", cyc - last_retire));
      end
      last_retire = cyc;
    end
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    logic wb;
    ir = '0; flags = '0;
    #12 rst_n = 1;
    // Held while run is low.
    repeat (3) @(posedge clk);
    #1;
    expect1(ctl.ir_load, 1'b0, "idle ir_load");
    expect1(ctl.opnd_load, 1'b0, "idle opnd_load");
    run = 1;
    #1;                     // first fetch
    wb = 0;
    for (int o = 0; o < 32; o++) begin
      if (o == 15) continue;   // HLT last
      foreach (flag_set[k]) begin
        // fetch (write-back of the previous instruction happens here)
        expect1(ctl.ir_load, 1'b1, "fetch ir_load");
        expect1(ctl.pc_inc, 1'b1, "fetch pc_inc");
        expect1(ctl.maddr_sel == MA_PC, 1'b1, "fetch maddr");
        expect1(ctl.mem_we, 1'b0, "fetch mem_we");
        expect1(ctl.rf_we, wb, "wb rf_we");
        if (wb) expect1(ctl.rf_waddr == ir.dst, 1'b1, "wb waddr");
        ir = instr_t'({5'(o), 3'($urandom), 3'($urandom), 3'($urandom), 2'b00});
        flags = flags_t'(flag_set[k]);
        @(posedge clk); #1;
        expect1(ctl.opnd_load, 1'b1, "decode opnd_load");
        expect1(ctl.rf_we, 1'b0, "decode rf_we");
        expect1(retire, 1'b0, "decode retire");
        @(posedge clk); #1;
        e = decode_ref(5'(o), flags);
        expect1(retire, 1'b1, "exec retire");
        expect1(ctl.alu_en, e.alu, "alu_en");
        expect1(ctl.shf_en, e.shf, "shf_en");
        expect1(ctl.cmp_en, e.cmp, "cmp_en");
        expect1(ctl.mem_we, e.st, "mem_we");
        expect1(ctl.bus_oe, e.st, "bus_oe");
        expect1(ctl.pc_load, e.jmp, "pc_load");
        expect1(ctl.pc_inc, e.ldi, "pc_inc");
        expect1(ctl.maddr_sel == MA_AR, e.ld | e.st, "maddr ar");
        wb = e.alu | e.shf | e.ld | e.ldi;
        expect1(ctl.res_load, wb, "res_load");
        if (e.alu) expect1(ctl.alu_op == e.aluop, 1'b1, "alu_op");
        if (e.shf) expect1(ctl.shf_op == e.shfop, 1'b1, "shf_op");
        if (e.shf) expect1(ctl.res_sel == RES_SHIFT, 1'b1, "res_sel shift");
        if (e.ld | e.ldi) expect1(ctl.res_sel == RES_MEM, 1'b1, "res_sel mem");
        if (e.alu) expect1(ctl.res_sel == RES_ALU, 1'b1, "res_sel alu");
        if (cond_true) n_cond_t++;
        if (cond_false) n_cond_f++;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (n_cond_t == 0 || n_cond_f == 0) fail("conditional paths not both seen");
    // HLT
    ir = instr_t'({5'b01111, 11'h0});
    repeat (3) @(posedge clk);
    #1;
    expect1(halted, 1'b1, "halted");
    repeat (4) @(posedge clk);
    #1;
    expect1(halted, 1'b1, "stays halted");
    expect1(ctl.ir_load, 1'b0, "halted no fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
