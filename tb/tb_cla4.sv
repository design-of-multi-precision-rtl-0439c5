// tb_cla4: exhaustive test of cla4 against a + b + cin, including the group propagate/generate outputs.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_cla4;
  localparam int WATCHDOG_CYCLES = 20000;
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

  logic [3:0] a, b, sum;
  logic cin, cout, pg, gg;
  longint unsigned exp;
  cla4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .pg(pg), .gg(gg));

  initial begin
    for (int i = 0; i < (1 << (2 * 4 + 1)); i++) begin
      {a, b, cin} = (2 * 4 + 1)'(i);
      #1;
      exp = longint'(a) + longint'(b) + longint'(cin);
      check({cout, sum} == (5)'(exp), $sformatf("cla4 %0d+%0d+%0d", a, b, cin));
      check(pg == ((a ^ b) == '1), $sformatf("cla4 pg %0d %0d", a, b));
      check(gg == (longint'(a) + longint'(b) >= (longint'(1) << 4)), $sformatf("cla4 gg %0d %0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
