// tb_risc16_top - end-to-end test of the whole processor at its default size.
//
// Builds a program in the testbench, loads it through the load port, runs
// the core to HLT and compares every memory word the program writes with an
// instruction-level reference model of the instruction set written here.
// The program has three parts:
//   1. a counted loop (ADD/DEC/CMP/JNE) that sums 5+4+3+2+1, stores the sum
//      with ST, reads it back with LD, and an unconditional JMP that skips a
//      poisoned word;
//   2. NRAND random instructions: all ALU, shift and move operations, CMP,
//      and the conditional MOVEQ/MOVNE/MOVGT/MOVLT/ADDEQ;
//   3. a dump of all eight registers to memory, then HLT.
// It also checks that every instruction takes exactly three clocks and that
// the total run time is 3 x (instructions executed), and counts each
// mechanism of the design: write-back overlapped with fetch, conditional
// instruction taken and skipped, jump taken and not taken, load, store,
// load-immediate, idle (enable-gated) ALU, and halt. A mechanism never seen
// counts as a failure.
module tb_risc16_top;
  import risc16_pkg::*;

  localparam int NRAND     = 400;
  localparam int DATA_ADDR = 'h4000;
  localparam int DUMP_ADDR = 'h4100;

  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0, load_en = 1, ext_we = 0;
  word_t ext_addr = 0, ext_wdata = 0, ext_rdata, pc;
  logic  halted, retire, cond_true, cond_false;

  risc16_top dut (
    .clk, .rst_n, .load_en, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
    .halted, .retire, .cond_true, .cond_false, .pc
  );

  always #5 clk = ~clk;

  // ------------------------------------------------------------------
  // Program image and reference model
  // ------------------------------------------------------------------
  word_t prog [$];
  word_t mm [int];          // reference memory (only words the program touches)
  bit    written [int];     // addresses the program stores to

  function automatic void emit(opcode_e op, int d, int s1, int s2);
    prog.push_back(make_instr(op, raddr_t'(d), raddr_t'(s1), raddr_t'(s2)));
  endfunction

  function automatic void emit_ldi(int d, int value);
    emit(OP_LDI, d, 0, 0);
    prog.push_back(word_t'(value));
  endfunction

  // Reference: executes the image one instruction at a time.
  int unsigned ref_steps;
  function automatic void run_reference();
    int unsigned r [8];
    int unsigned p = 0;
    bit eq = 0, gt = 0, lt = 0;
    foreach (r[i]) r[i] = 0;
    ref_steps = 0;
    for (int guard = 0; guard < 100000; guard++) begin
      word_t w = mm.exists(p) ? mm[p] : 16'h0;
      logic [4:0] op = w[15:11];
      int unsigned d = int'(w[10:8]), a = int'(w[7:5]), b = int'(w[4:2]);
      int unsigned x = r[a], y = r[b];
      ref_steps++;
      p = (p + 1) % 65536;
      case (op)
        5'b00001: r[d] = mm.exists(x) ? int'(mm[x]) : 0;
        5'b00010: begin mm[x] = 16'(y); written[x] = 1; end
        5'b00011: begin r[d] = int'(mm[p]); p = (p + 1) % 65536; end
        5'b00100: p = x;
        5'b00101: begin eq = (x == y); gt = (x > y); lt = (x < y); end
        5'b00110: r[d] = 0;
        5'b00111: r[d] = (x + 1) % 65536;
        5'b01000: r[d] = (x + 65535) % 65536;
        5'b01001: r[d] = x & y;
        5'b01010: r[d] = x | y;
        5'b01011: r[d] = x ^ y;
        5'b01100: r[d] = 65535 - x;
        5'b01101: r[d] = (x + y) % 65536;
        5'b01110: r[d] = (x + 65536 - y) % 65536;
        5'b01111: return;
        5'b10000: if (eq)  r[d] = x;
        5'b10001: if (!eq) r[d] = x;
        5'b10010: if (gt)  r[d] = x;
        5'b10011: if (lt)  r[d] = x;
        5'b10100: if (eq)  p = x;
        5'b10101: if (!eq) p = x;
        5'b10110: if (eq)  r[d] = (x + y) % 65536;
        5'b11000: r[d] = x;
        5'b11010: r[d] = (x * 2) % 65536;
        5'b11011: r[d] = x / 2;
        5'b11100: r[d] = ((x * 2) % 65536) + (x / 32768);
        5'b11101: r[d] = (x / 2) + ((x % 2) * 32768);
        default: ;
      endcase
    end
    $display("reference model did not halt");
  endfunction

  function automatic void build_program();
    int fix;
    // Part 1: counted loop, store/load, unconditional and conditional jumps.
    emit_ldi(1, 0);            // r1 = sum
    emit_ldi(2, 5);            // r2 = counter
    emit(OP_CLR, 3, 0, 0);     // r3 = 0
    emit_ldi(4, 0);            // r4 = loop address
    prog[prog.size() - 1] = word_t'(prog.size());
    emit(OP_ADD, 1, 1, 2);     // loop:
    emit(OP_DEC, 2, 2, 0);
    emit(OP_CMP, 0, 2, 3);
    emit(OP_JNE, 0, 4, 0);     // taken 4 times, falls through once
    emit_ldi(5, DATA_ADDR);
    emit(OP_ST, 0, 5, 1);      // mem[DATA_ADDR] = 15
    emit(OP_LD, 6, 5, 0);      // r6 = 15
    emit(OP_INC, 6, 6, 0);     // r6 = 16
    emit(OP_ST, 0, 5, 6);      // mem[DATA_ADDR] = 16
    emit_ldi(4, 0);
    fix = prog.size() - 1;
    emit(OP_JMP, 0, 4, 0);     // skips the next (poisoned) instruction
    emit_ldi(6, 'hDEAD);
    prog[fix] = word_t'(prog.size());
    emit_ldi(7, 0);
    fix = prog.size() - 1;
    emit(OP_CMP, 0, 6, 6);
    emit(OP_JEQ, 0, 7, 0);     // taken
    emit_ldi(6, 'hBEEF);
    prog[fix] = word_t'(prog.size());
    // Part 2: random register operations; r7 is only ever a source.
    for (int i = 0; i < 8; i++) emit_ldi(i, $urandom);
    for (int i = 0; i < NRAND; i++) begin
      opcode_e ops [20] = '{OP_INC, OP_DEC, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_ADD,
                           OP_SUB, OP_MOV, OP_CLR, OP_SHL, OP_SHR, OP_ROL, OP_ROR,
                           OP_CMP, OP_MOVEQ, OP_MOVNE, OP_MOVGT, OP_MOVLT, OP_ADDEQ};
      opcode_e o = ops[$urandom_range(0, 19)];
      int s1 = $urandom_range(0, 7);
      int s2 = ($urandom_range(0, 4) == 0) ? s1 : $urandom_range(0, 7);
      emit(o, $urandom_range(0, 6), s1, s2);
    end
    // Part 3: dump r0..r6 to DUMP_ADDR.., then halt.
    emit_ldi(7, DUMP_ADDR);
    for (int i = 0; i < 7; i++) begin
      emit(OP_ST, 0, 7, i);
      emit(OP_INC, 7, 7, 0);
    end
    emit(OP_HLT, 0, 0, 0);
  endfunction

  // ------------------------------------------------------------------
  // Mechanism counters and timing
  // ------------------------------------------------------------------
  int n_wb_overlap = 0, n_cond_true = 0, n_cond_false = 0, n_jump_taken = 0;
  int n_jump_not = 0, n_load = 0, n_store = 0, n_ldi = 0, n_alu_idle = 0;
  int n_retire = 0, cyc = 0, last_retire = -1, run_cycles = 0, n_bad_cpi = 0;
  logic running = 0;

  always @(posedge clk) begin
    if (running) begin
      cyc++;
      if (dut.ctl.rf_we && dut.ctl.ir_load) n_wb_overlap++;
      if (cond_true) n_cond_true++;
      if (cond_false) n_cond_false++;
      if (dut.ctl.pc_load) n_jump_taken++;
      if (cond_false && (dut.ir.op == OP_JEQ || dut.ir.op == OP_JNE)) n_jump_not++;
      if (dut.ctl.res_load && dut.ctl.res_sel == RES_MEM && dut.ctl.maddr_sel == MA_AR) n_load++;
      if (dut.ctl.res_load && dut.ctl.res_sel == RES_MEM && dut.ctl.maddr_sel == MA_PC) n_ldi++;
      if (dut.ctl.mem_we) n_store++;
      if (retire && !dut.ctl.alu_en) n_alu_idle++;
      if (retire) begin
        n_retire++;
        if (last_retire >= 0 && cyc - last_retire != 3) n_bad_cpi++;
        last_retire = cyc;
      end
    end
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%h) expected %0d (0x%h)", what, got, got, exp, exp);
    end
  endtask

  task automatic expect_seen(int n, string what);
    checks++;
    $display("  %s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int start;
    build_program();
    foreach (prog[i]) mm[i] = prog[i];
    run_reference();
    $display("program: %0d words, %0d instructions executed by the reference",
             prog.size(), ref_steps);

    // Load the program while the core is held.
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      ext_we = 1; ext_addr = word_t'(i); ext_wdata = prog[i];
    end
    @(negedge clk);
    ext_we = 0;
    // Clear the data words the program reads back.
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = word_t'(DUMP_ADDR + i); ext_wdata = 0;
    end
    @(negedge clk);
    ext_we = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_en = 0;
    running = 1;
    start = cyc;
    while (!halted) @(posedge clk);
    @(negedge clk);
    running = 0;
    run_cycles = last_retire - start;

    // Read results through the load port.
    load_en = 1;
    foreach (written[a]) begin
      @(negedge clk);
      ext_addr = word_t'(a);
      #1;
      expect_eq(int'(ext_rdata), int'(mm[a]), $sformatf("mem[%h]", a));
    end
    expect_eq(int'(mm[DATA_ADDR]), 16, "loop sum + 1 in reference");
    expect_eq(n_retire, int'(ref_steps), "instructions executed");
    expect_eq(run_cycles, 3 * int'(ref_steps), "total clocks = 3 x instructions");
    expect_eq(n_bad_cpi, 0, "instructions not taking 3 clocks");
    $display("mechanisms:");
    expect_seen(n_wb_overlap, "write-back during fetch");
    expect_seen(n_cond_true, "conditional executed");
    expect_seen(n_cond_false, "conditional as NOP");
    expect_seen(n_jump_taken, "jump taken");
    expect_seen(n_jump_not, "conditional jump not taken");
    expect_seen(n_load, "load");
    expect_seen(n_store, "store");
    expect_seen(n_ldi, "load immediate");
    expect_seen(n_alu_idle, "ALU idle (enable low)");
    expect_seen(int'(halted), "halt");
    $display("run: %0d instructions in %0d clocks", n_retire, run_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
