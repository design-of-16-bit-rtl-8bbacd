// instruction_register - holds the instruction word fetched from memory.
//
// Loaded at the end of the fetch cycle and kept for decode and execute. Its
// output is the word split into fields (opcode, DST, SRC1, SRC2); the field
// layout [15:11] opcode, [10:8] DST, [7:5] SRC1, [4:2] SRC2 with two unused
// low bits is this design's choice, as is resetting to a NOP word.
module instruction_register
  import risc16_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  word_t  d,
  output instr_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;          // all-zero word is NOP
    else if (load) q <= instr_t'(d);
  end

endmodule
