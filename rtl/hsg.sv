// Half Sum Generation (HSG) unit of the reduced-logic carry select adder.
//
// One half adder per bit: half sum hs = a ^ b (the propagate word) and half
// carry hc = a & b (the generate word). Both carry generators and the full
// sum generator reuse these, so the per-bit XOR/AND is built only once.
//
// Interface: a, b (WIDTH bits) -> hs, hc (WIDTH bits). Combinational.
// The unit and its two outputs are as described in the source; reading
// "half sum" and "half carry" as XOR and AND is the standard meaning.
module hsg
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] hs,
  output logic [WIDTH-1:0] hc
);
  always_comb begin
    hs = a ^ b;
    hc = a & b;
  end
endmodule : hsg
