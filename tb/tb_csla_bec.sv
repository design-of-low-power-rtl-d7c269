// Self-checking testbench for csla_bec.
//
// Runs the default 32-bit adder with 4-bit groups and a 12-bit adder with
// 3-bit groups on directed corner cases (full-length carry propagation,
// zero operands, all ones) and random vectors. Sum, carry out and every
// group's carry out are compared with integer arithmetic. It also counts
// how often a group took its excess-1 (carry in 1) path and its plain
// ripple (carry in 0) path; each must occur. Watchdog: 50000 clock cycles.
module tb_csla_bec;
  localparam int W = 32, G = 4;
  localparam int W2 = 12, G2 = 3;

  logic clk = 1'b0;
  logic [W-1:0]    a, b, sum;
  logic            cin, cout;
  logic [W/G-1:0]  gc;
  logic [W2-1:0]   a2, b2, sum2;
  logic            cin2, cout2;
  logic [W2/G2-1:0] gc2;
  int   checks = 0, failures = 0;
  int   n_bec_path = 0, n_rca_path = 0;

  csla_bec dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .grp_carry(gc));
  csla_bec #(.WIDTH(W2), .GROUP(G2)) dut2 (
    .a(a2), .b(b2), .cin(cin2), .sum(sum2), .cout(cout2), .grp_carry(gc2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry out of the low 'bits' bits of x + y + c.
  function automatic bit carry_at(longint unsigned x, longint unsigned y, bit c, int bits);
    longint unsigned m = (64'd1 << bits) - 1;
    return 1'(((x & m) + (y & m) + 64'(c)) >> bits);
  endfunction

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic vc);
    longint unsigned exp;
    a = va; b = vb; cin = vc;
    a2 = W2'($urandom); b2 = W2'($urandom); cin2 = 1'($urandom);
    @(posedge clk);
    exp = longint'(va) + longint'(vb) + longint'(vc);
    checks++;
    if ({cout, sum} !== (W+1)'(exp)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b -> %0b_%h expected %h", va, vb, vc, cout, sum, exp);
    end
    for (int g = 0; g < W/G; g++) begin
      checks++;
      if (gc[g] !== carry_at(va, vb, vc, (g+1)*G)) begin
        failures++;
        $display("FAIL group %0d carry a=%h b=%h cin=%0b", g, va, vb, vc);
      end
      if (g < W/G - 1) begin
        if (gc[g]) n_bec_path++; else n_rca_path++;
      end
    end
    checks++;
    if ({cout2, sum2} !== (W2+1)'(int'(a2) + int'(b2) + int'(cin2))) begin
      failures++;
      $display("FAIL 12b a=%h b=%h cin=%0b -> %0b_%h", a2, b2, cin2, cout2, sum2);
    end
    for (int g = 0; g < W2/G2; g++) begin
      checks++;
      if (gc2[g] !== carry_at(64'(a2), 64'(b2), cin2, (g+1)*G2)) begin
        failures++;
        $display("FAIL 12b group %0d carry", g);
      end
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);          // carry ripples through every group
    apply('1, 32'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(32'h0F0F_0F0F, 32'h00F0_F0F1, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int n = 0; n < 5000; n++) begin
      apply(W'($urandom), W'($urandom), 1'($urandom));
    end
    // Sparse operands: long propagate runs are rare with uniform data.
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] x;
      x = W'($urandom);
      apply(x, ~x ^ (W'(1) << ($urandom % W)), 1'($urandom));
    end
    $display("group select: excess-1 path %0d times, ripple path %0d times",
             n_bec_path, n_rca_path);
    checks++;
    if (n_bec_path == 0 || n_rca_path == 0) begin
      failures++;
      $display("FAIL a select path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_csla_bec
