// Carry Generation (CG) unit of the reduced-logic carry select adder.
//
// Produces the carry word for an input carry fixed at elaboration time:
//   c[i] = hc[i] | (hs[i] & c[i-1]),   c[-1] = CIN
// where c[i] is the carry out of bit i. The adder uses two copies, CG0
// (CIN = 0) and CG1 (CIN = 1). With the carry in a constant, bit 0 reduces
// to hc[0] (CG0) or hs[0] | hc[0] (CG1): this is the "optimized design for a
// fixed input carry" of the source, left to constant folding here.
//
// Interface: hs, hc (WIDTH bits, from HSG) -> c (WIDTH bits). Combinational.
// The two-CG structure is the source's; the recurrence is the standard
// generate/propagate carry, the source not printing its gates.
module carry_gen
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH,
  parameter bit          CIN   = 1'b0
) (
  input  logic [WIDTH-1:0] hs,
  input  logic [WIDTH-1:0] hc,
  output logic [WIDTH-1:0] c
);
  assign c[0] = hc[0] | (hs[0] & CIN);
  for (genvar i = 1; i < WIDTH; i++) begin : g_carry
    assign c[i] = hc[i] | (hs[i] & c[i-1]);
  end
endmodule : carry_gen
