// tb_table1_workload - runs the instruction verification table on the core.
//
// The thirteen arithmetic, logic, shift and move instructions of the
// published verification table are run with that table's operand values
// (16-bit words, written below in binary) on the full processor clocked at
// 500 MHz (2 ns period). For each one the testbench loads the operands with
// LDI, executes the instruction, stores the result and compares it with the
// value worked out here. It also measures the time between the completion
// of consecutive instructions: three clocks, 6 ns, i.e. about 167 million
// instructions per second, as the table and the throughput figure state.
module tb_table1_workload;
  import risc16_pkg::*;

  localparam int RES_ADDR = 'h2000;

  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0, load_en = 1, ext_we = 0;
  word_t ext_addr = 0, ext_wdata = 0, ext_rdata, pc;
  logic  halted, retire, cond_true, cond_false;

  risc16_top dut (
    .clk, .rst_n, .load_en, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
    .halted, .retire, .cond_true, .cond_false, .pc
  );

  always #1 clk = ~clk;     // 2 ns period: 500 MHz

  typedef struct {
    string   name;
    opcode_e op;
    word_t   s1, s2, expect_d;
  } row_t;

  row_t rows [13] = '{
    '{"ADD", OP_ADD, 16'b0000000000000010, 16'b0110000000000000, 16'b0110000000000010},
    '{"INC", OP_INC, 16'b0011000000000000, 16'h0,                16'b0011000000000001},
    '{"DEC", OP_DEC, 16'b0011000000000000, 16'h0,                16'b0010111111111111},
    '{"XOR", OP_XOR, 16'b0001000000000000, 16'b0110000000000000, 16'b0111000000000000},
    '{"AND", OP_AND, 16'b0100000000000000, 16'b0110000000000000, 16'b0100000000000000},
    '{"SUB", OP_SUB, 16'b0110000000000100, 16'b0110000000000000, 16'b0000000000000100},
    '{"NOT", OP_NOT, 16'b0110000000000000, 16'h0,                16'b1001111111111111},
    '{"OR",  OP_OR,  16'b0100000000000000, 16'b0000000000000010, 16'b0100000000000010},
    '{"SHL", OP_SHL, 16'b0100000000000000, 16'h0,                16'b1000000000000000},
    '{"SHR", OP_SHR, 16'b1100000000000000, 16'h0,                16'b0110000000000000},
    '{"ROL", OP_ROL, 16'b1100000000000000, 16'h0,                16'b1000000000000001},
    '{"ROR", OP_ROR, 16'b0100000000000000, 16'h0,                16'b0010000000000000},
    '{"MOV", OP_MOV, 16'b0000000000000010, 16'h0,                16'b0000000000000010}
  };

  word_t prog [$];

  function automatic void emit(opcode_e op, int d, int s1, int s2);
    prog.push_back(make_instr(op, raddr_t'(d), raddr_t'(s1), raddr_t'(s2)));
  endfunction

  // Completion times of the table instructions themselves.
  realtime done_at [13];
  int      n_done = 0;
  int      row_of_retire [int];   // retire index -> row
  int      n_retire = 0;

  always @(posedge clk) begin
    if (!load_en && retire) begin
      if (row_of_retire.exists(n_retire)) begin
        done_at[row_of_retire[n_retire]] = $realtime;
        n_done++;
      end
      n_retire++;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    realtime t_first, t_last;
    idx = 0;
    // r7 = result address; per row: r1 = s1, r2 = s2, r3 = 16'h5555 (old
    // destination value), op r3, r1, r2, ST [r7] <- r3, INC r7.
    emit(OP_LDI, 7, 0, 0); prog.push_back(word_t'(RES_ADDR)); idx++;
    foreach (rows[i]) begin
      emit(OP_LDI, 1, 0, 0); prog.push_back(rows[i].s1);   idx++;
      emit(OP_LDI, 2, 0, 0); prog.push_back(rows[i].s2);   idx++;
      emit(OP_LDI, 3, 0, 0); prog.push_back(16'h5555);     idx++;
      emit(OP_ST, 0, 7, 3);                                idx++;
      emit(rows[i].op, 3, 1, 2);
      row_of_retire[idx] = i;                              idx++;
      emit(OP_ST, 0, 7, 3);                                idx++;
      emit(OP_INC, 7, 7, 0);                               idx++;
    end
    // The table instructions back to back, to time them in a row.
    emit(OP_LDI, 1, 0, 0); prog.push_back(rows[0].s1); idx++;
    emit(OP_LDI, 2, 0, 0); prog.push_back(rows[0].s2); idx++;
    foreach (rows[i]) begin
      emit(rows[i].op, 4, 1, 2); idx++;
    end
    emit(OP_HLT, 0, 0, 0);

    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      ext_we = 1; ext_addr = word_t'(i); ext_wdata = prog[i];
    end
    @(negedge clk);
    ext_we = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    load_en = 0;
    t_first = 0;
    while (!halted) begin
      @(posedge clk);
      if (retire && t_first == 0) t_first = $realtime;
      if (retire) t_last = $realtime;
    end
    @(negedge clk);
    load_en = 1;
    foreach (rows[i]) begin
      @(negedge clk);
      ext_addr = word_t'(RES_ADDR + i);
      #0.5;
      checks++;
      if (ext_rdata !== rows[i].expect_d) begin
        failures++;
        $display("FAIL %s %b,%b -> %b expected %b", rows[i].name, rows[i].s1, rows[i].s2,
                 ext_rdata, rows[i].expect_d);
      end else begin
        $display("%s  %b %b -> %b", rows[i].name, rows[i].s1, rows[i].s2, ext_rdata);
      end
    end
    checks++;
    if (n_done != 13) begin failures++; $display("FAIL %0d table instructions seen", n_done); end
    // Each instruction completes 6 ns (3 clocks at 2 ns) after the previous.
    checks++;
    if (t_last - t_first != 6.0 * (n_retire - 1)) begin
      failures++;
      $display("FAIL %0d instructions spanned %0t", n_retire, t_last - t_first);
    end
    $display("%0d instructions, %0.1f ns each: %0.1f MIPS at 500 MHz", n_retire,
             (t_last - t_first) / (n_retire - 1), 1000.0 * (n_retire - 1) / (t_last - t_first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
