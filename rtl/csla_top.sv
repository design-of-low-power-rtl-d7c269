// Top level: the two carry select adders side by side.
//
//  * csla_bec : the proposed adder, a WIDTH-bit carry select adder whose
//               carry-in-1 ripple adders are replaced by binary to excess-1
//               converters (GROUP-bit groups).
//  * rl_csla  : the reduced-logic carry select adder built from the HSG,
//               CG0/CG1, CS and FSG units.
// The two share nothing; each has its own operands and results. Everything
// is combinational: results are valid one propagation delay after the
// inputs change. Defaults: WIDTH = 32 (from the source), GROUP = 4 (this
// design's choice).
module csla_top
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH,
  parameter int unsigned GROUP = GROUP_WIDTH
) (
  input  logic [WIDTH-1:0]       bec_a,
  input  logic [WIDTH-1:0]       bec_b,
  input  logic                   bec_cin,
  output logic [WIDTH-1:0]       bec_sum,
  output logic                   bec_cout,
  output logic [WIDTH/GROUP-1:0] bec_grp_carry,

  input  logic [WIDTH-1:0]       rl_a,
  input  logic [WIDTH-1:0]       rl_b,
  input  logic                   rl_cin,
  output logic [WIDTH-1:0]       rl_sum,
  output logic                   rl_cout
);
  csla_bec #(.WIDTH(WIDTH), .GROUP(GROUP)) u_csla_bec (
    .a        (bec_a),
    .b        (bec_b),
    .cin      (bec_cin),
    .sum      (bec_sum),
    .cout     (bec_cout),
    .grp_carry(bec_grp_carry)
  );

  rl_csla #(.WIDTH(WIDTH)) u_rl_csla (
    .a   (rl_a),
    .b   (rl_b),
    .cin (rl_cin),
    .sum (rl_sum),
    .cout(rl_cout)
  );
endmodule : csla_top
