// Reduced-logic carry select adder (HSG / CG0 / CG1 / CS / FSG).
//
// Instead of two complete ripple adders, this carry select adder shares one
// half-sum stage and duplicates only the carry chain:
//   hsg        : hs = a ^ b, hc = a & b
//   carry_gen  : CG0 with a fixed carry in of 0, CG1 with a fixed carry in of 1
//   carry_sel  : picks the CG0 or CG1 carry word by cin
//   fsg        : sum = hs ^ {c[WIDTH-2:0], cin}, cout = c[WIDTH-1]
// Both carry words are ready before cin is known; cin then only drives one
// level of multiplexers and the final XOR.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Combinational. The four units and their connections follow the source;
// the single ungrouped WIDTH-bit structure and the 32-bit default are this
// design's choices.
module rl_csla
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] hs, hc, c0, c1, c;

  hsg #(.WIDTH(WIDTH)) u_hsg (.a(a), .b(b), .hs(hs), .hc(hc));

  carry_gen #(.WIDTH(WIDTH), .CIN(1'b0)) u_cg0 (.hs(hs), .hc(hc), .c(c0));
  carry_gen #(.WIDTH(WIDTH), .CIN(1'b1)) u_cg1 (.hs(hs), .hc(hc), .c(c1));

  carry_sel #(.WIDTH(WIDTH)) u_cs (.c0(c0), .c1(c1), .cin(cin), .c(c));

  fsg #(.WIDTH(WIDTH)) u_fsg (.hs(hs), .c(c), .cin(cin), .sum(sum), .cout(cout));
endmodule : rl_csla
