// tristate_reg - store-data register with a bus driver.
//
// Loaded in the decode cycle with the value of SRC2; during the execute cycle
// of ST the control unit raises oe and the register drives the memory data
// bus. The published design names a tri-state register. Here the bus has no
// high-impedance state: when not driving, bus reads 0 and bus_oe is low, so
// the bus can be merged with a plain multiplexer (this design's choice).
// bus_oe repeats oe on purpose: it is the drive flag that goes with the bus,
// so a bus user can tell a driven zero from no driver.
module tristate_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             oe,
  output logic [WIDTH-1:0] bus,
  output logic             bus_oe
);

  logic [WIDTH-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

  assign bus    = oe ? q : '0;
  assign bus_oe = oe;

endmodule
