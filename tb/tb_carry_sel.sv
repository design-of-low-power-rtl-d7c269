// Self-checking testbench for carry_sel: random carry words with both values
// of the carry in; the output must be c1 when cin is 1 and c0 otherwise.
// Watchdog: 2000 cycles.
module tb_carry_sel;
  logic clk = 1'b0;
  logic [31:0] c0, c1, c;
  logic cin;
  int   checks = 0, failures = 0;

  carry_sel dut (.c0(c0), .c1(c1), .cin(cin), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      c0 = $urandom; c1 = $urandom; cin = n[0];
      @(posedge clk);
      checks++;
      if (c !== (n[0] ? c1 : c0)) begin
        failures++;
        $display("FAIL c0=%h c1=%h cin=%0b c=%h", c0, c1, cin, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_carry_sel
