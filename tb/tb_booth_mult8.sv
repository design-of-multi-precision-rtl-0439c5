// tb_booth_mult8: exhaustive test of booth_mult8: all 65536 operand pairs in each
// of the four signed/unsigned operand combinations, against the product
// computed with integer arithmetic.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_booth_mult8;
  localparam int WATCHDOG_CYCLES = 60000;
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

  logic [7:0] a, b;
  logic a_signed, b_signed;
  logic [15:0] p;
  int av, bv;
  booth_mult8 dut (.a(a), .b(b), .a_signed(a_signed), .b_signed(b_signed), .p(p));

  initial begin
    for (int s = 0; s < 4; s++) begin
      {a_signed, b_signed} = 2'(s);
      for (int i = 0; i < 65536; i++) begin
        {a, b} = 16'(i);
        #1;
        av = a_signed ? int'($signed(a)) : int'(a);
        bv = b_signed ? int'($signed(b)) : int'(b);
        check(p == 16'(av * bv), $sformatf("booth8 s=%0d%0d %0d*%0d got %0h", a_signed, b_signed, av, bv, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
