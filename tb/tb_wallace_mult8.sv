// tb_wallace_mult8: exhaustive test of wallace_mult8 in both precisions. In 8-bit
// mode p must be a*b for all 65536 operand pairs; in 4-bit mode p must be
// a[3:0]*b[3:0] whatever the upper nibbles hold, and levels_on must show
// only level 1 in use. Counts how often each mode was exercised and how
// often the mode switched.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_wallace_mult8;
  import rwtm_pkg::*;
  localparam int WATCHDOG_CYCLES = 50000;
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
  wt_prec_e prec;
  logic [15:0] p;
  logic [2:0] levels_on;
  int n4 = 0, n8 = 0, nswitch = 0;
  wallace_mult8 dut (.a(a), .b(b), .prec(prec), .p(p), .levels_on(levels_on));

  initial begin
    prec = PREC_8BIT;
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      prec = PREC_8BIT;
      #1;
      n8++;
      check(p == 16'(int'(a) * int'(b)), $sformatf("8b %0d*%0d got %0d", a, b, p));
      check(levels_on == 3'b111, "8b levels_on");
      prec = PREC_4BIT;
      nswitch++;
      #1;
      n4++;
      check(p == 16'(int'(a[3:0]) * int'(b[3:0])), $sformatf("4b %0h*%0h got %0d", a, b, p));
      check(levels_on == 3'b001, "4b levels_on");
    end
    check(n4 > 0 && n8 > 0 && nswitch > 0, "both modes exercised");
    $display("modes: 4-bit=%0d 8-bit=%0d switches=%0d", n4, n8, nswitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
