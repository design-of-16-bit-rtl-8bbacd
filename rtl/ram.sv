// ram - the single memory shared by instructions and data.
//
// DEPTH words of WIDTH bits, one port: asynchronous read of addr, write of
// wdata at the clock edge when we is high. Instruction fetch, LD, LDI and ST
// all go through this one port, one access per cycle. One memory for code and
// data follows the published design; its size (the whole 16-bit address
// space by default) and the asynchronous read are this design's choices.
// Contents are not reset. Addresses at or above DEPTH wrap (low bits used).
module ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = 16
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [IW-1:0]    idx;

  assign idx   = IW'(addr);
  assign rdata = mem[idx];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= wdata;
  end

endmodule
