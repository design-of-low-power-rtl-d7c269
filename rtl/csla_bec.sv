// Carry select adder with binary to excess-1 converters (BEC CSLA).
//
// A conventional carry select adder computes every group twice, with two
// ripple adders assuming a carry in of 0 and of 1, and lets the real carry
// pick one. Here the carry-in-1 ripple adder is replaced by a (GROUP+1)-bit
// BEC, which adds one to the {carry, sum} of the carry-in-0 ripple adder with
// far fewer gates. Group g (g >= 1) therefore holds:
//   rca  (GROUP bits, ci = 0)  -> {c0, s0}
//   bec  (GROUP+1 bits)        -> {c0, s0} + 1
//   carry_select_mux           -> chooses by the carry out of group g-1
// Group 0 sees the adder's real carry in, so it is a single ripple adder.
// The carry crosses each group through one multiplexer instead of GROUP
// full adders.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout, and
// grp_carry (one bit per group: the carry out of each group, bit g being
// group g). Purely combinational; no clock.
//
// From the source: the BEC replacing the carry-in-1 adder, the BEC fed by
// the carry-in-0 result, the (n+1)-bit BEC width and the 32-bit width. This
// design's choices: uniform GROUP-bit groups (default 4, matching the 4-bit
// BEC), a plain ripple adder for group 0, and the grp_carry observation port.
// WIDTH must be a multiple of GROUP.
module csla_bec
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH,
  parameter int unsigned GROUP = GROUP_WIDTH
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic                   cin,
  output logic [WIDTH-1:0]       sum,
  output logic                   cout,
  output logic [WIDTH/GROUP-1:0] grp_carry
);
  localparam int unsigned NGROUPS = WIDTH / GROUP;

  initial begin
    assert (WIDTH % GROUP == 0 && GROUP > 0)
      else $error("csla_bec: WIDTH (%0d) must be a multiple of GROUP (%0d)", WIDTH, GROUP);
  end

  // Group 0: ripple adder on the real carry in.
  rca #(.WIDTH(GROUP)) u_rca_g0 (
    .a (a[GROUP-1:0]),
    .b (b[GROUP-1:0]),
    .ci(cin),
    .s (sum[GROUP-1:0]),
    .co(grp_carry[0])
  );

  for (genvar g = 1; g < NGROUPS; g++) begin : g_grp
    logic [GROUP:0] res0;  // {carry, sum} for a carry in of 0
    logic [GROUP:0] res1;  // {carry, sum} for a carry in of 1, via the BEC
    logic [GROUP:0] sel_res;

    rca #(.WIDTH(GROUP)) u_rca (
      .a (a[g*GROUP +: GROUP]),
      .b (b[g*GROUP +: GROUP]),
      .ci(1'b0),
      .s (res0[GROUP-1:0]),
      .co(res0[GROUP])
    );

    bec #(.WIDTH(GROUP+1)) u_bec (
      .b(res0),
      .x(res1)
    );

    carry_select_mux #(.WIDTH(GROUP+1)) u_mux (
      .d0 (res0),
      .d1 (res1),
      .sel(grp_carry[g-1]),
      .y  (sel_res)
    );

    assign sum[g*GROUP +: GROUP] = sel_res[GROUP-1:0];
    assign grp_carry[g]          = sel_res[GROUP];
  end

  assign cout = grp_carry[NGROUPS-1];
endmodule : csla_bec
