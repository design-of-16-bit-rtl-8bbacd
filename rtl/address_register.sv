// address_register - memory and jump address for the execute cycle.
//
// Loaded in the decode cycle with the value of source register SRC1; in the
// execute cycle it addresses the RAM for LD and ST and gives the target of
// JMP, JEQ and JNE. The published design names an address register; this use
// of it and its reset value 0 are this design's choices.
module address_register #(
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
