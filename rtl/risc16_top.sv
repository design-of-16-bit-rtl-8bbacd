// risc16_top - 16-bit multi-cycle RISC processor.
//
// One RAM holds both program and data; one ALU, a one-place shifter and a
// comparator do all the work; eight 16-bit registers hold operands. The
// control unit runs each instruction in three clocks (fetch, decode,
// execute) and overlaps the write-back of one instruction with the fetch of
// the next, so every instruction takes the same time, CPI 3. Conditional
// instructions read the comparator flags and turn into no-operations when
// their condition fails, which replaces short branches.
//
// Datapath, per cycle:
//   FETCH   RAM[PC] -> instruction register, PC+1,
//           output ALU register -> register file (previous instruction)
//   DECODE  reg[SRC1], reg[SRC2] -> input ALU register;
//           reg[SRC1] -> address register; reg[SRC2] -> tri-state register
//   EXECUTE ALU / shifter / RAM[AR] / RAM[PC] -> output ALU register,
//           or tri-state register -> RAM[AR] (ST), or AR -> PC (jumps),
//           or comparator flags update (CMP)
//
// Interface: clk, asynchronous active-low rst_n. While load_en is high the
// core is held and the RAM port belongs to ext_we/ext_addr/ext_wdata, with
// ext_rdata returning RAM[ext_addr] (program loading and result read-out;
// this port is this design's own). After reset with load_en low the core
// starts at address 0 and runs until HLT, then raises halted. retire pulses
// once per instruction; cond_true/cond_false pulse when a conditional
// instruction takes effect or is skipped.
//
// The block set (control unit, ALU, shifter, comparator, RAM, program
// counter, input/output ALU registers, address, instruction and tri-state
// registers, register file) follows the published design; how they are
// wired here is reconstructed from its description of the steps.
module risc16_top
  import risc16_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 65536,
  parameter int unsigned NREGS     = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_en,
  input  logic  ext_we,
  input  word_t ext_addr,
  input  word_t ext_wdata,
  output word_t ext_rdata,
  output logic  halted,
  output logic  retire,
  output logic  cond_true,
  output logic  cond_false,
  output word_t pc
);

  ctl_t   ctl;
  instr_t ir;
  flags_t flags;
  word_t  ar, opa, opb, rd1, rd2, alu_y, shf_y, res, res_q;
  word_t  mem_addr, mem_wdata, mem_rdata, bus;
  logic   mem_we, bus_oe;
  logic   run;

  assign run = !load_en;

  control_unit u_ctl (
    .clk, .rst_n, .run, .ir, .flags, .ctl, .halted, .retire, .cond_true, .cond_false
  );

  program_counter #(.WIDTH(XLEN)) u_pc (
    .clk, .rst_n, .inc(ctl.pc_inc), .load(ctl.pc_load), .d(ar), .q(pc)
  );

  // Shared memory port: the load interface, else the core's address select.
  always_comb begin
    if (load_en) begin
      mem_addr  = ext_addr;
      mem_we    = ext_we;
      mem_wdata = ext_wdata;
    end else begin
      mem_addr  = (ctl.maddr_sel == MA_AR) ? ar : pc;
      mem_we    = ctl.mem_we && bus_oe;
      mem_wdata = bus;
    end
  end

  ram #(.WIDTH(XLEN), .DEPTH(MEM_DEPTH), .AW(XLEN)) u_ram (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );
  assign ext_rdata = mem_rdata;

  instruction_register u_ir (
    .clk, .rst_n, .load(ctl.ir_load), .d(mem_rdata), .q(ir)
  );

  register_file #(.WIDTH(XLEN), .NREGS(NREGS), .AW(RADDR)) u_rf (
    .clk, .rst_n, .we(ctl.rf_we), .waddr(ctl.rf_waddr), .wdata(res_q),
    .raddr1(ir.src1), .rdata1(rd1), .raddr2(ir.src2), .rdata2(rd2)
  );

  alu_in_reg #(.WIDTH(XLEN)) u_ain (
    .clk, .rst_n, .load(ctl.opnd_load), .a_d(rd1), .b_d(rd2), .a_q(opa), .b_q(opb)
  );

  address_register #(.WIDTH(XLEN)) u_ar (
    .clk, .rst_n, .load(ctl.opnd_load), .d(rd1), .q(ar)
  );

  tristate_reg #(.WIDTH(XLEN)) u_tri (
    .clk, .rst_n, .load(ctl.opnd_load), .d(rd2), .oe(ctl.bus_oe), .bus, .bus_oe
  );

  alu #(.WIDTH(XLEN)) u_alu (
    .en(ctl.alu_en), .op(ctl.alu_op), .a(opa), .b(opb), .y(alu_y)
  );

  shifter #(.WIDTH(XLEN)) u_shf (
    .en(ctl.shf_en), .op(ctl.shf_op), .a(opa), .y(shf_y)
  );

  comparator #(.WIDTH(XLEN)) u_cmp (
    .clk, .rst_n, .en(ctl.cmp_en), .a(opa), .b(opb), .flags
  );

  always_comb begin
    unique case (ctl.res_sel)
      RES_SHIFT: res = shf_y;
      RES_MEM:   res = mem_rdata;
      default:   res = alu_y;
    endcase
  end

  alu_out_reg #(.WIDTH(XLEN)) u_aout (
    .clk, .rst_n, .load(ctl.res_load), .d(res), .q(res_q)
  );

endmodule
