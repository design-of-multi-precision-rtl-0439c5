// tb_cla16: random test (plus carry-chain corner cases) of cla16 against a + b + cin, including the group propagate/generate outputs.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_cla16;
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

  logic [15:0] a, b, sum;
  logic cin, cout, pg, gg;
  longint unsigned exp;
  cla16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .pg(pg), .gg(gg));

  initial begin
    for (int i = 0; i < 40000; i++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      if (i < 4) begin a = 16'hFFFF; b = 16'(i); end
      #1;
      exp = longint'(a) + longint'(b) + longint'(cin);
      check({cout, sum} == (17)'(exp), $sformatf("cla16 %0d+%0d+%0d", a, b, cin));
      check(pg == ((a ^ b) == '1), $sformatf("cla16 pg %0d %0d", a, b));
      check(gg == (longint'(a) + longint'(b) >= (longint'(1) << 16)), $sformatf("cla16 gg %0d %0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
