// Self-checking testbench for rca at its default 4-bit width and at 8 bits:
// every input combination of the 4-bit adder and 2000 random vectors of the
// 8-bit adder, compared with the integer sum a + b + ci. Watchdog: 20000
// clock cycles.
module tb_rca;
  logic clk = 1'b0;
  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic ci4, co4, ci8, co8;
  int   checks = 0, failures = 0;

  rca              dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  rca #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .ci(ci8), .s(s8), .co(co8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; ci8 = 1'b0;
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      @(posedge clk);
      checks++;
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++;
        $display("FAIL 4b a=%h b=%h ci=%0b -> %h", a4, b4, ci4, {co4, s4});
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); ci8 = 1'($urandom);
      @(posedge clk);
      checks++;
      if ({co8, s8} !== 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++;
        $display("FAIL 8b a=%h b=%h ci=%0b -> %h", a8, b8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_rca
