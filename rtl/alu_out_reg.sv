// alu_out_reg - the output ALU register: the result waiting for write-back.
//
// Loaded at the end of the execute cycle with the result chosen by the
// control unit (ALU, shifter or memory read data). During the following
// cycle, which is already the fetch of the next instruction, its value is
// written to the register file; this overlap is what lets the four steps of
// an instruction complete in three clocks. Named in the published design;
// the overlap and reset value 0 are this design's choices.
module alu_out_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
