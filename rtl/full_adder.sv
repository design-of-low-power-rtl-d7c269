// One-bit full adder, the cell of the ripple carry adder.
//
// s  = a ^ b ^ ci
// co = majority(a, b, ci)
//
// Purely combinational. The cell and its ports (A_i, B_i, C_i in; S_i, C_o out)
// follow the ripple-carry-adder drawing; the gate equations are the standard
// ones, the drawing showing only a box.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule : full_adder
