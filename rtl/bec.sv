// Binary to excess-1 converter (BEC): x = b + 1 modulo 2^WIDTH.
//
// Bit 0 is inverted; every higher bit i is XORed with the AND of all bits
// below it:
//   x[0] = ~b[0]
//   x[i] =  b[i] ^ (b[i-1] & ... & b[0])
// For WIDTH = 4 the connections are those of the source's four-output
// converter (X0 from B0 alone, each X_i from B_i and all lower bits); the
// gate functions follow from the converter adding one.
// It needs no adder cells, which is where the area saving of the BEC carry
// select adder comes from. The AND terms are built as a running prefix
// chain; extending the four-bit circuit to any WIDTH is this design's choice.
//
// Interface: b (WIDTH bits) -> x (WIDTH bits). Combinational.
module bec #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  // all_ones[i] is the AND of b[i-1:0]; all_ones[0] = 1.
  logic [WIDTH-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_and
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end

  assign x = b ^ all_ones;
endmodule : bec
