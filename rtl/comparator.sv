// comparator - compares two register values and keeps the outcome as flags.
//
// When en is high (execute cycle of CMP) it compares a and b as unsigned
// numbers and stores eq, gt and lt at the clock edge. The flags stay until the
// next CMP and decide whether a conditional instruction (MOVEQ, MOVNE, MOVGT,
// MOVLT, ADDEQ, JEQ, JNE) takes effect or acts as a no-operation. The
// published design names a comparator and uses conditional execution in place
// of branch prediction; the flag register, the unsigned compare and the reset
// value (all flags 0) are this design's choices.
module comparator
  import risc16_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output flags_t           flags
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
    end else if (en) begin
      flags.eq <= (a == b);
      flags.gt <= (a >  b);
      flags.lt <= (a <  b);
    end
  end

  // Exactly one relation holds once a comparison has been made.
  a_one_flag: assert property (@(posedge clk) disable iff (!rst_n)
                               $past(en) |-> $onehot({flags.eq, flags.gt, flags.lt}));

endmodule
