// N-bit ripple carry adder (RCA).
//
// WIDTH full adders in a row: the carry out of stage k is the carry in of
// stage k+1, the first stage takes ci and the last stage drives co. The
// delay grows linearly with WIDTH, which is what the carry select adder
// works around.
//
// Interface: a, b (WIDTH bits), ci -> s (WIDTH bits), co. Combinational.
// The chain structure is the one of the source's full-adder drawing; the
// default width of 4 (one carry-select group) is this design's choice.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  // carry[k] is the carry into stage k; carry[WIDTH] is the carry out.
  logic [WIDTH:0] carry;

  assign carry[0] = ci;

  for (genvar k = 0; k < WIDTH; k++) begin : g_stage
    full_adder u_fa (
      .a (a[k]),
      .b (b[k]),
      .ci(carry[k]),
      .s (s[k]),
      .co(carry[k+1])
    );
  end

  assign co = carry[WIDTH];
endmodule : rca
