// tb_wallace_level1: exhaustive test of wallace_level1: for all 4-bit operands the
// AND partial products of the low nibbles go in and a[3:0] * b[3:0] must come out.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_wallace_level1;
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

  logic [3:0] a, b;
  logic [3:0][3:0] pp;
  logic [7:0] p;
  wallace_level1 dut (.pp(pp), .p(p));

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      for (int j = 0; j < 4; j++) pp[j] = a & {4{b[j]}};
      #1;
      check(p == 8'(int'(a) * int'(b)), $sformatf("L1 %0d*%0d got %0d", a, b, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
