// End-to-end testbench for csla_top at its default parameters (32-bit
// operands, 4-bit groups).
//
// Drives both adders with directed corner cases and random operands and
// compares each sum and carry out with a + b + cin. It counts how often
// each mechanism of the two adders occurred, and fails if one never did:
//   BEC adder : a group selected its excess-1 (carry in 1) result;
//               a group selected its plain ripple (carry in 0) result;
//               a carry entered at cin left at cout through every group;
//               the adder produced a carry out.
//   RL adder  : the carry select unit took the CG1 word where it differed
//               from CG0, and took the CG0 word where it differed from CG1;
//               the adder produced a carry out.
// Watchdog: 100000 clock cycles.
module tb_csla_top;
  localparam int W = 32, G = 4, NG = W / G;

  logic clk = 1'b0;
  logic [W-1:0]  bec_a, bec_b, bec_sum, rl_a, rl_b, rl_sum;
  logic          bec_cin, bec_cout, rl_cin, rl_cout;
  logic [NG-1:0] bec_grp_carry;
  int   checks = 0, failures = 0;
  int   n_bec_path = 0, n_rca_path = 0, n_full_ripple = 0, n_bec_cout = 0;
  int   n_rl_cg1 = 0, n_rl_cg0 = 0, n_rl_cout = 0;

  csla_top dut (
    .bec_a(bec_a), .bec_b(bec_b), .bec_cin(bec_cin),
    .bec_sum(bec_sum), .bec_cout(bec_cout), .bec_grp_carry(bec_grp_carry),
    .rl_a(rl_a), .rl_b(rl_b), .rl_cin(rl_cin),
    .rl_sum(rl_sum), .rl_cout(rl_cout)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] a, logic [W-1:0] b, logic c,
                       logic [W-1:0] ra, logic [W-1:0] rb, logic rc);
    longint unsigned exp, rexp;
    bec_a = a; bec_b = b; bec_cin = c;
    rl_a = ra; rl_b = rb; rl_cin = rc;
    @(posedge clk);
    exp  = 64'(a) + 64'(b) + 64'(c);
    rexp = 64'(ra) + 64'(rb) + 64'(rc);
    checks++;
    if ({bec_cout, bec_sum} !== (W+1)'(exp)) begin
      failures++;
      $display("FAIL BEC a=%h b=%h cin=%0b -> %0b_%h", a, b, c, bec_cout, bec_sum);
    end
    checks++;
    if ({rl_cout, rl_sum} !== (W+1)'(rexp)) begin
      failures++;
      $display("FAIL RL a=%h b=%h cin=%0b -> %0b_%h", ra, rb, rc, rl_cout, rl_sum);
    end
    // Mechanism counters, from the observable group carries and results.
    for (int g = 0; g < NG - 1; g++) begin
      if (bec_grp_carry[g]) n_bec_path++; else n_rca_path++;
    end
    if (c && (a ^ b) == '1 && bec_cout) n_full_ripple++;
    if (bec_cout) n_bec_cout++;
    // The selection matters only where the CG0 and CG1 words differ.
    if (dut.u_rl_csla.c0 != dut.u_rl_csla.c1) begin
      if (rc) n_rl_cg1++; else n_rl_cg0++;
    end
    if (rl_cout) n_rl_cout++;
  endtask

  initial begin
    apply('0, '0, 1'b0, '0, '0, 1'b0);
    apply('1, '0, 1'b1, '1, '0, 1'b1);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1, 32'h5555_5555, 32'hAAAA_AAAA, 1'b0);
    apply('1, '1, 1'b0, '1, '1, 1'b1);
    for (int n = 0; n < 20000; n++) begin
      apply(W'($urandom), W'($urandom), 1'($urandom),
            W'($urandom), W'($urandom), 1'($urandom));
    end
    $display("BEC adder: excess-1 path %0d, ripple path %0d, full ripple %0d, carry out %0d",
             n_bec_path, n_rca_path, n_full_ripple, n_bec_cout);
    $display("RL adder: CG1 word chosen %0d, CG0 word chosen %0d, carry out %0d",
             n_rl_cg1, n_rl_cg0, n_rl_cout);
    checks++;
    if (n_bec_path == 0 || n_rca_path == 0 || n_full_ripple == 0 || n_bec_cout == 0 ||
        n_rl_cg1 == 0 || n_rl_cg0 == 0 || n_rl_cout == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_csla_top
