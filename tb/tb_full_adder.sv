// tb_full_adder: exhaustive self-checking test of full_adder against a + b + cin.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_full_adder;
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

  logic a, b, cin, sum, cout;
  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      check({cout, sum} == 2'(a) + 2'(b) + 2'(cin), $sformatf("fa %03b", 3'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
