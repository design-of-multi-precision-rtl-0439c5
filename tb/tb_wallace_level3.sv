// tb_wallace_level3: random test of wallace_level3: the product must equal
// p_ll + sum + carry modulo 2**16, with carry-chain corner cases.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_wallace_level3;
  localparam int WATCHDOG_CYCLES = 100000;
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

  logic [7:0] p_ll;
  logic [15:0] sum, carry, p;
  wallace_level3 dut (.p_ll(p_ll), .sum(sum), .carry(carry), .p(p));

  initial begin
    for (int i = 0; i < 20000; i++) begin
      p_ll = 8'($urandom); sum = 16'($urandom); carry = 16'($urandom);
      if (i == 0) begin p_ll = 8'h01; sum = 16'hFFFF; carry = 16'h0000; end
      if (i == 1) begin p_ll = 8'hFF; sum = 16'hFF00; carry = 16'h0001; end
      #1;
      check(p == 16'(int'(p_ll) + int'(sum) + int'(carry)),
            $sformatf("L3 %0h+%0h+%0h got %0h", p_ll, sum, carry, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
