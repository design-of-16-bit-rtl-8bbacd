// risc16_pkg - shared types and constants of the 16-bit multi-cycle RISC core.
//
// Holds the instruction word layout, the 5-bit opcode map, the operation
// selects of the ALU and the shifter, the comparator flags and the bundle of
// control signals the control unit drives into the datapath.
//
// Opcodes of the thirteen arithmetic, logic, shift and move instructions
// (ADD 01101 ... ROR 11101) follow the published instruction table. The
// other fifteen of the 28 instructions (memory access, jumps, compare,
// conditional moves, halt) and the field layout of the instruction word are
// this design's own choice:
//   [15:11] opcode  [10:8] DST  [7:5] SRC1  [4:2] SRC2  [1:0] unused
package risc16_pkg;

  localparam int unsigned XLEN   = 16;
  localparam int unsigned RADDR  = 3;          // 8 general registers
  localparam int unsigned OPW    = 5;

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [RADDR-1:0] raddr_t;

  typedef enum logic [OPW-1:0] {
    OP_NOP   = 5'b00000,
    OP_LD    = 5'b00001,  // DST <- mem[SRC1]
    OP_ST    = 5'b00010,  // mem[SRC1] <- SRC2
    OP_LDI   = 5'b00011,  // DST <- next word, PC skips it
    OP_JMP   = 5'b00100,  // PC <- SRC1
    OP_CMP   = 5'b00101,  // flags <- compare(SRC1, SRC2)
    OP_CLR   = 5'b00110,  // DST <- 0
    OP_INC   = 5'b00111,
    OP_DEC   = 5'b01000,
    OP_AND   = 5'b01001,
    OP_OR    = 5'b01010,
    OP_XOR   = 5'b01011,
    OP_NOT   = 5'b01100,
    OP_ADD   = 5'b01101,
    OP_SUB   = 5'b01110,
    OP_HLT   = 5'b01111,
    OP_MOVEQ = 5'b10000,  // conditional moves: DST <- SRC1 if flag
    OP_MOVNE = 5'b10001,
    OP_MOVGT = 5'b10010,
    OP_MOVLT = 5'b10011,
    OP_JEQ   = 5'b10100,  // PC <- SRC1 if eq
    OP_JNE   = 5'b10101,  // PC <- SRC1 if not eq
    OP_ADDEQ = 5'b10110,  // DST <- SRC1 + SRC2 if eq
    OP_MOV   = 5'b11000,
    OP_SHL   = 5'b11010,
    OP_SHR   = 5'b11011,
    OP_ROL   = 5'b11100,
    OP_ROR   = 5'b11101
  } opcode_e;

  typedef struct packed {
    logic [OPW-1:0] op;
    raddr_t         dst;
    raddr_t         src1;
    raddr_t         src2;
    logic [1:0]     unused;
  } instr_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_INC, ALU_DEC, ALU_AND, ALU_OR, ALU_XOR, ALU_NOT,
    ALU_PASS, ALU_ZERO
  } alu_op_e;

  typedef enum logic [1:0] { SH_SHL, SH_SHR, SH_ROL, SH_ROR } shift_op_e;

  typedef struct packed {
    logic eq;
    logic gt;
    logic lt;
  } flags_t;

  // Source of the value latched into the output ALU register.
  typedef enum logic [1:0] { RES_ALU, RES_SHIFT, RES_MEM } res_sel_e;

  // Source of the RAM address.
  typedef enum logic { MA_PC, MA_AR } maddr_sel_e;

  typedef struct packed {
    logic       ir_load;     // fetch: IR <- mem[PC]
    logic       pc_inc;
    logic       pc_load;     // PC <- address register
    logic       opnd_load;   // decode: ALU input regs, AR, tri-state reg
    logic       alu_en;
    alu_op_e    alu_op;
    logic       shf_en;
    shift_op_e  shf_op;
    logic       cmp_en;
    res_sel_e   res_sel;
    logic       res_load;    // execute: output ALU register <- result
    maddr_sel_e maddr_sel;
    logic       mem_we;
    logic       bus_oe;      // tri-state register drives the data bus
    logic       rf_we;       // write-back of the output ALU register
    raddr_t     rf_waddr;
  } ctl_t;

  // Assembles one instruction word (used by test programs).
  function automatic word_t make_instr(opcode_e op, raddr_t dst,
                                       raddr_t s1, raddr_t s2);
    instr_t i;
    i.op     = op;
    i.dst    = dst;
    i.src1   = s1;
    i.src2   = s2;
    i.unused = '0;
    return word_t'(i);
  endfunction

endpackage
