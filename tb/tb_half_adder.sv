// tb_half_adder: exhaustive self-checking test of half_adder against a + b.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_half_adder;
  localparam int WATCHDOG_CYCLES = 1000;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a, b, sum, carry;
  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check(({carry, sum}) == (2'(a) + 2'(b)), $sformatf("ha %0d%0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
