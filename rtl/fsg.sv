// Full Sum Generation (FSG) unit of the reduced-logic carry select adder.
//
// Forms the final sum from the half sum and the selected carry word:
//   sum[i] = hs[i] ^ c[i-1],   c[-1] = cin
// and passes the top carry bit out as the adder's carry out.
//
// Interface: hs, c (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Combinational. The unit's role is the source's; the XOR equation is the
// standard one.
module fsg
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic [WIDTH-1:0] hs,
  input  logic [WIDTH-1:0] c,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] cprev;  // carry into each bit

  if (WIDTH > 1) begin : g_wide
    assign cprev = {c[WIDTH-2:0], cin};
  end else begin : g_one
    assign cprev = cin;
  end

  assign sum  = hs ^ cprev;
  assign cout = c[WIDTH-1];
endmodule : fsg
