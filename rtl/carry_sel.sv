// Carry Selection (CS) unit of the reduced-logic carry select adder.
//
// Chooses the carry word of CG0 or CG1 by the adder's real carry in, the
// control signal of the unit. WIDTH 2:1 multiplexers.
//
// Interface: c0, c1 (WIDTH bits), cin -> c (WIDTH bits). Combinational.
// Taking the adder's carry in as the select is this design's reading of the
// source's "control signal".
module carry_sel
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic [WIDTH-1:0] c0,
  input  logic [WIDTH-1:0] c1,
  input  logic             cin,
  output logic [WIDTH-1:0] c
);
  always_comb c = cin ? c1 : c0;
endmodule : carry_sel
