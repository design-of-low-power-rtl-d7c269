// Self-checking testbench for carry_select_mux: random data words with both
// select values; y must equal d1 when sel is 1 and d0 otherwise.
// Watchdog: 2000 clock cycles.
module tb_carry_select_mux;
  logic clk = 1'b0;
  logic [4:0] d0, d1, y;
  logic sel;
  int   checks = 0, failures = 0;

  carry_select_mux dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

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
      d0 = 5'($urandom); d1 = 5'($urandom); sel = n[0];
      @(posedge clk);
      checks++;
      if (y !== (n[0] ? d1 : d0)) begin
        failures++;
        $display("FAIL d0=%h d1=%h sel=%0b y=%h", d0, d1, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_carry_select_mux
