// alu - the single arithmetic/logic unit of the core.
//
// Computes ADD, SUB, INC, DEC, AND, OR, XOR, NOT, a pass-through for MOV and
// a clear, all on WIDTH-bit two's-complement words (modulo 2^WIDTH). The
// instruction set and the 16-bit width follow the published design. The
// block has an enable from the control unit so that it idles when an
// instruction does not need it; while en is low the operands are isolated and
// y reads 0 (the isolation scheme is this design's choice).
// Purely combinational: the result is taken into the output ALU register at
// the end of the execute cycle.
module alu
  import risc16_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             en,
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] ai, bi;
  logic [WIDTH-1:0] r;

  assign ai = en ? a : '0;
  assign bi = en ? b : '0;

  always_comb begin
    r = '0;
    unique case (op)
      ALU_ADD:  r = ai + bi;
      ALU_SUB:  r = ai - bi;
      ALU_INC:  r = ai + WIDTH'(1);
      ALU_DEC:  r = ai - WIDTH'(1);
      ALU_AND:  r = ai & bi;
      ALU_OR:   r = ai | bi;
      ALU_XOR:  r = ai ^ bi;
      ALU_NOT:  r = ~ai;
      ALU_PASS: r = ai;
      ALU_ZERO: r = '0;
      default:  r = '0;
    endcase
    if (!en) r = '0;
  end

  assign y = r[WIDTH-1:0];

endmodule
