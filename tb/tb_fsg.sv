// Self-checking testbench for fsg. The half sum and a correct carry word are
// formed in the testbench from random operands (carry word bit i = carry out
// of the low i+1 bits of a + b + cin); the unit's sum and carry out must
// then equal a + b + cin. Watchdog: 5000 cycles.
module tb_fsg;
  logic clk = 1'b0;
  logic [31:0] a, b, hs, c, sum;
  logic cin, cout;
  int   checks = 0, failures = 0;

  fsg dut (.hs(hs), .c(c), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint unsigned m;
      a = $urandom; b = $urandom; cin = 1'($urandom);
      hs = a ^ b;
      for (int i = 0; i < 32; i++) begin
        m = (64'd1 << (i + 1)) - 1;
        c[i] = 1'(((64'(a) & m) + (64'(b) & m) + 64'(cin)) >> (i + 1));
      end
      @(posedge clk);
      checks++;
      if ({cout, sum} !== 33'(64'(a) + 64'(b) + 64'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b -> %0b_%h", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fsg
