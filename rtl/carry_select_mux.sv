// Carry select multiplexer of one BEC carry-select group.
//
// Picks d0, the {carry, sum} the group's ripple adder produces for a carry in
// of 0, or d1, the same word plus one from the excess-1 converter, by the
// real carry into the group (sel). The result's top bit is the group's carry
// out, which drives the select of the next group.
//
// Interface: d0, d1 (WIDTH bits), sel -> y (WIDTH bits). Combinational.
// WIDTH = 5 by default: a 4-bit group plus its carry (this design's choice).
module carry_select_mux #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule : carry_select_mux
