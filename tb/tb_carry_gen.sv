// Self-checking testbench for carry_gen, both as CG0 (carry in 0) and CG1
// (carry in 1). Half sums and half carries are formed from random 32-bit
// operands; bit i of each carry word must equal the carry out of the low
// i+1 bits of a + b + CIN, computed with integer arithmetic.
// Watchdog: 10000 cycles.
module tb_carry_gen;
  logic clk = 1'b0;
  logic [31:0] a, b, hs, hc, c0, c1;
  int   checks = 0, failures = 0;

  assign hs = a ^ b;
  assign hc = a & b;

  carry_gen #(.CIN(1'b0)) dut0 (.hs(hs), .hc(hc), .c(c0));
  carry_gen #(.CIN(1'b1)) dut1 (.hs(hs), .hc(hc), .c(c1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit carry_at(logic [31:0] x, logic [31:0] y, bit c, int bits);
    longint unsigned m = (64'd1 << bits) - 1;
    return 1'(((64'(x) & m) + (64'(y) & m) + 64'(c)) >> bits);
  endfunction

  task automatic check(logic [31:0] va, logic [31:0] vb);
    a = va; b = vb;
    @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      checks += 2;
      if (c0[i] !== carry_at(va, vb, 1'b0, i + 1)) begin
        failures++;
        $display("FAIL CG0 bit %0d a=%h b=%h c0=%h", i, va, vb, c0);
      end
      if (c1[i] !== carry_at(va, vb, 1'b1, i + 1)) begin
        failures++;
        $display("FAIL CG1 bit %0d a=%h b=%h c1=%h", i, va, vb, c1);
      end
    end
  endtask

  initial begin
    check('1, '0);
    check('0, '0);
    check('1, '1);
    for (int n = 0; n < 2000; n++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_carry_gen
