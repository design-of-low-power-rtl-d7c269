// Self-checking testbench for bec: every input of the default 4-bit
// converter and of a 5-bit one (the width used inside a 4-bit carry-select
// group), compared with b + 1 modulo 2^WIDTH. The 4-bit case also checks the
// per-output equations X0 = ~B0, X1 = B1^B0, X2 = B2^(B1&B0),
// X3 = B3^(B2&B1&B0). Watchdog: 1000 clock cycles.
module tb_bec;
  logic clk = 1'b0;
  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  int   checks = 0, failures = 0;

  bec              dut4 (.b(b4), .x(x4));
  bec #(.WIDTH(5)) dut5 (.b(b5), .x(x5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b5 = '0;
    for (int v = 0; v < 16; v++) begin
      b4 = 4'(v);
      @(posedge clk);
      checks++;
      if (x4 !== 4'(v + 1)) begin
        failures++;
        $display("FAIL 4b b=%b x=%b", b4, x4);
      end
      checks++;
      if (x4 !== {b4[3] ^ (b4[2] & b4[1] & b4[0]), b4[2] ^ (b4[1] & b4[0]),
                  b4[1] ^ b4[0], ~b4[0]}) begin
        failures++;
        $display("FAIL 4b equations b=%b x=%b", b4, x4);
      end
    end
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v);
      @(posedge clk);
      checks++;
      if (x5 !== 5'(v + 1)) begin
        failures++;
        $display("FAIL 5b b=%b x=%b", b5, x5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_bec
