// Self-checking testbench for hsg: random 32-bit operands; the half sum must
// be the bitwise XOR and the half carry the bitwise AND, and per bit
// {hc, hs} must equal the two-bit sum a[i] + b[i]. Watchdog: 5000 cycles.
module tb_hsg;
  logic clk = 1'b0;
  logic [31:0] a, b, hs, hc;
  int   checks = 0, failures = 0;

  hsg dut (.a(a), .b(b), .hs(hs), .hc(hc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      a = $urandom; b = $urandom;
      @(posedge clk);
      for (int i = 0; i < 32; i++) begin
        checks++;
        if ({hc[i], hs[i]} !== 2'(int'(a[i]) + int'(b[i]))) begin
          failures++;
          $display("FAIL bit %0d a=%h b=%h hs=%h hc=%h", i, a, b, hs, hc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_hsg
