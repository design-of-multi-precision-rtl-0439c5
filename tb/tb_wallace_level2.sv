// tb_wallace_level2: exhaustive test of wallace_level2: for all 8-bit operand pairs
// the three upper-quadrant partial-product groups go in, and sum + carry must
// equal a*b minus the low-nibble product a[3:0]*b[3:0].
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_wallace_level2;
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

  logic [7:0] a, b;
  logic [3:0][3:0] pp_hl, pp_lh, pp_hh;
  logic [15:0] sum, carry;
  int unsigned exp;
  wallace_level2 dut (.pp_hl(pp_hl), .pp_lh(pp_lh), .pp_hh(pp_hh),
                      .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      for (int j = 0; j < 4; j++) begin
        pp_hl[j] = a[7:4] & {4{b[j]}};
        pp_lh[j] = a[3:0] & {4{b[4+j]}};
        pp_hh[j] = a[7:4] & {4{b[4+j]}};
      end
      #1;
      exp = int'(a) * int'(b) - int'(a[3:0]) * int'(b[3:0]);
      check(16'(sum + carry) == 16'(exp), $sformatf("L2 a=%0d b=%0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
