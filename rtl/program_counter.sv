// program_counter - address of the next instruction word.
//
// Counts up by one (inc) each time a word is taken from memory in program
// order, and loads d (load) when a jump is taken; load wins if both are high.
// Resets to 0, where execution starts. Incrementing during fetch follows the
// published design; reset value and priority are this design's choices.
module program_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
    else if (inc)  q <= q + WIDTH'(1);
  end

endmodule
