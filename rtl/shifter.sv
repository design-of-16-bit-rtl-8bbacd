// shifter - one-position shift and rotate unit.
//
// SHL and SHR shift a WIDTH-bit word by one place with zero fill; ROL and ROR
// rotate it by one place. One-place operations match the worked examples of
// the published instruction table (0100...0 shifts left to 1000...0); zero
// fill for SHR is this design's choice. Like the ALU it has an enable from the
// control unit and outputs 0 while idle. Purely combinational.
module shifter
  import risc16_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             en,
  input  shift_op_e        op,
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    y = '0;
    if (en) begin
      unique case (op)
        SH_SHL: y = {a[WIDTH-2:0], 1'b0};
        SH_SHR: y = {1'b0, a[WIDTH-1:1]};
        SH_ROL: y = {a[WIDTH-2:0], a[WIDTH-1]};
        SH_ROR: y = {a[0], a[WIDTH-1:1]};
        default: y = '0;
      endcase
    end
  end

endmodule
