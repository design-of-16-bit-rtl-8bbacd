// alu_in_reg - the input ALU register: the two operands of the execute cycle.
//
// Loaded in the decode cycle with the two register-file read values (SRC1,
// SRC2), so the ALU, shifter and comparator see stable operands during
// execute while the register file is free. Named in the published design;
// its timing and reset value 0 are this design's choices.
module alu_in_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] a_d,
  input  logic [WIDTH-1:0] b_d,
  output logic [WIDTH-1:0] a_q,
  output logic [WIDTH-1:0] b_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a_d;
      b_q <= b_d;
    end
  end

endmodule
