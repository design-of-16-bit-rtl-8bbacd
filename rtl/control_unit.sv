// control_unit - sequencer and decoder of the multi-cycle core.
//
// Every instruction passes three clock cycles:
//   FETCH   RAM[PC] -> instruction register, PC+1; also the write-back of the
//           previous instruction (output ALU register -> register file)
//   DECODE  register file -> input ALU register, address register and
//           tri-state register
//   EXECUTE one shared ALU, the shifter, the comparator or the RAM does the
//           work; results go to the output ALU register, jumps load the PC
// so the four steps fetch / decode / execute / write-back finish in three
// clocks, the same for every instruction (CPI 3). HLT moves to a HALT state
// that only finishes a pending write-back.
//
// Blocks an instruction does not use are left idle: alu_en, shf_en and
// cmp_en are high only in the execute cycle of an instruction that needs that
// block. Conditional instructions (MOVEQ, MOVNE, MOVGT, MOVLT, ADDEQ, JEQ,
// JNE) test the comparator flags in the execute cycle; if the condition fails
// the instruction does nothing, so no branch prediction is needed.
//
// The three-step flow, the block enables, conditional execution and CPI 3
// follow the published design. The state encoding, the overlap of write-back
// with the next fetch and the condition set are this design's choices.
// While run is low (program loading) the sequencer stays where it is and
// drives no enables.
module control_unit
  import risc16_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  input  instr_t ir,
  input  flags_t flags,
  output ctl_t   ctl,
  output logic   halted,
  output logic   retire,        // pulse: execute cycle of an instruction
  output logic   cond_true,     // pulse: conditional instruction took effect
  output logic   cond_false     // pulse: conditional instruction acted as NOP
);

  typedef enum logic [1:0] { S_FETCH, S_DECODE, S_EXEC, S_HALT } state_e;

  state_e state, state_n;
  logic   wb_pend;
  raddr_t wb_rd;

  // Decode of the instruction in the IR.
  logic is_cond, cond_ok, wb_n;
  opcode_e op;

  assign op = opcode_e'(ir.op);

  always_comb begin
    is_cond = 1'b1;
    unique case (op)
      OP_MOVEQ, OP_ADDEQ, OP_JEQ: cond_ok = flags.eq;
      OP_MOVNE, OP_JNE:           cond_ok = !flags.eq;
      OP_MOVGT:                   cond_ok = flags.gt;
      OP_MOVLT:                   cond_ok = flags.lt;
      default: begin
        cond_ok = 1'b1;
        is_cond = 1'b0;
      end
    endcase
  end

  always_comb begin
    ctl           = '0;
    ctl.alu_op    = ALU_PASS;
    ctl.shf_op    = SH_SHL;
    ctl.res_sel   = RES_ALU;
    ctl.maddr_sel = MA_PC;
    ctl.rf_we     = run && wb_pend;
    ctl.rf_waddr  = wb_rd;
    state_n       = state;
    wb_n          = 1'b0;

    if (run) begin
      unique case (state)
        S_FETCH: begin
          ctl.maddr_sel = MA_PC;
          ctl.ir_load   = 1'b1;
          ctl.pc_inc    = 1'b1;
          state_n       = S_DECODE;
        end
        S_DECODE: begin
          ctl.opnd_load = 1'b1;
          state_n       = S_EXEC;
        end
        S_EXEC: begin
          state_n = S_FETCH;
          if (cond_ok) begin
            unique case (op)
              OP_INC, OP_DEC, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_ADD, OP_SUB,
              OP_MOV, OP_CLR, OP_MOVEQ, OP_MOVNE, OP_MOVGT, OP_MOVLT,
              OP_ADDEQ: begin
                ctl.alu_en   = 1'b1;
                ctl.res_sel  = RES_ALU;
                ctl.res_load = 1'b1;
                wb_n         = 1'b1;
                unique case (op)
                  OP_INC:            ctl.alu_op = ALU_INC;
                  OP_DEC:            ctl.alu_op = ALU_DEC;
                  OP_AND:            ctl.alu_op = ALU_AND;
                  OP_OR:             ctl.alu_op = ALU_OR;
                  OP_XOR:            ctl.alu_op = ALU_XOR;
                  OP_NOT:            ctl.alu_op = ALU_NOT;
                  OP_ADD, OP_ADDEQ:  ctl.alu_op = ALU_ADD;
                  OP_SUB:            ctl.alu_op = ALU_SUB;
                  OP_CLR:            ctl.alu_op = ALU_ZERO;
                  default:           ctl.alu_op = ALU_PASS;
                endcase
              end
              OP_SHL, OP_SHR, OP_ROL, OP_ROR: begin
                ctl.shf_en   = 1'b1;
                ctl.res_sel  = RES_SHIFT;
                ctl.res_load = 1'b1;
                wb_n         = 1'b1;
                unique case (op)
                  OP_SHL:  ctl.shf_op = SH_SHL;
                  OP_SHR:  ctl.shf_op = SH_SHR;
                  OP_ROL:  ctl.shf_op = SH_ROL;
                  default: ctl.shf_op = SH_ROR;
                endcase
              end
              OP_LD: begin
                ctl.maddr_sel = MA_AR;
                ctl.res_sel   = RES_MEM;
                ctl.res_load  = 1'b1;
                wb_n          = 1'b1;
              end
              OP_LDI: begin
                ctl.maddr_sel = MA_PC;
                ctl.res_sel   = RES_MEM;
                ctl.res_load  = 1'b1;
                ctl.pc_inc    = 1'b1;
                wb_n          = 1'b1;
              end
              OP_ST: begin
                ctl.maddr_sel = MA_AR;
                ctl.mem_we    = 1'b1;
                ctl.bus_oe    = 1'b1;
              end
              OP_JMP, OP_JEQ, OP_JNE: ctl.pc_load = 1'b1;
              OP_CMP: ctl.cmp_en = 1'b1;
              OP_HLT: state_n = S_HALT;
              default: ;   // NOP and unused codes
            endcase
          end
        end
        default: state_n = S_HALT;   // S_HALT
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FETCH;
      wb_pend <= 1'b0;
      wb_rd   <= '0;
    end else if (run) begin
      state   <= state_n;
      wb_pend <= wb_n;
      if (wb_n) wb_rd <= ir.dst;
    end
  end

  assign halted     = (state == S_HALT);
  assign retire     = run && (state == S_EXEC);
  assign cond_true  = retire && is_cond && cond_ok;
  assign cond_false = retire && is_cond && !cond_ok;

  // Memory is written only in the execute cycle, and never while fetching.
  a_we_in_exec: assert property (@(posedge clk) disable iff (!rst_n)
                                 ctl.mem_we |-> (state == S_EXEC && ctl.maddr_sel == MA_AR));
  // A pending write-back is done in the cycle after execute.
  a_wb_slot: assert property (@(posedge clk) disable iff (!rst_n)
                              wb_pend |-> (state == S_FETCH || state == S_HALT));

endmodule
