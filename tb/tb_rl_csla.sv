// Self-checking testbench for rl_csla at its default 32-bit width and at
// 5 bits (exhaustive). Results are compared with a + b + cin. It counts
// vectors where the carry select unit took the CG1 word, and of those the
// ones where the CG0 and CG1 words differed (the selection mattered); both
// must occur.
// Watchdog: 20000 cycles.
module tb_rl_csla;
  logic clk = 1'b0;
  logic [31:0] a, b, sum;
  logic cin, cout;
  logic [4:0] a5, b5, sum5;
  logic cin5, cout5;
  int   checks = 0, failures = 0;
  int   n_cg1 = 0, n_differ = 0;

  rl_csla              dut  (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  rl_csla #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(cin5), .sum(sum5), .cout(cout5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] va, logic [31:0] vb, logic vc);
    a = va; b = vb; cin = vc;
    @(posedge clk);
    checks++;
    if ({cout, sum} !== 33'(64'(va) + 64'(vb) + 64'(vc))) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b -> %0b_%h", va, vb, vc, cout, sum);
    end
    if (vc) n_cg1++;
    if (vc && dut.c0 != dut.c1) n_differ++;
  endtask

  initial begin
    a5 = '0; b5 = '0; cin5 = 1'b0;
    check32('1, '0, 1'b1);
    check32('1, '1, 1'b1);
    check32('0, '0, 1'b0);
    for (int n = 0; n < 3000; n++) check32($urandom, $urandom, 1'($urandom));
    for (int v = 0; v < 2048; v++) begin
      {cin5, a5, b5} = 11'(v);
      @(posedge clk);
      checks++;
      if ({cout5, sum5} !== 6'(int'(a5) + int'(b5) + int'(cin5))) begin
        failures++;
        $display("FAIL 5b a=%h b=%h cin=%0b -> %0b_%h", a5, b5, cin5, cout5, sum5);
      end
    end
    $display("carry select took CG1 %0d times (%0d with differing words)", n_cg1, n_differ);
    checks++;
    if (n_cg1 == 0 || n_differ == 0) begin
      failures++;
      $display("FAIL the CG1 selection was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_rl_csla
