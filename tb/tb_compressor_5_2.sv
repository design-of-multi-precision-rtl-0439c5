// tb_compressor_5_2: exhaustive test of compressor_5_2: for all 128 input patterns the
// outputs must satisfy x1+..+x5+cin1+cin2 = sum + 2*(carry+cout1+cout2), and
// cout1 must not depend on either lateral carry input.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_compressor_5_2;
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

  logic x1, x2, x3, x4, x5, cin1, cin2, sum, carry, cout1, cout2, ref_c1;
  compressor_5_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5),
                      .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry),
                      .cout1(cout1), .cout2(cout2));

  initial begin
    for (int i = 0; i < 128; i++) begin
      {x1, x2, x3, x4, x5, cin1, cin2} = 7'(i);
      #1;
      check(int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(x5) + int'(cin1) + int'(cin2)
            == int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2)),
            $sformatf("c52 in=%07b", 7'(i)));
      ref_c1 = int'(x1) + int'(x2) + int'(x3) >= 2;
      check(cout1 == ref_c1, $sformatf("c52 cout1 in=%07b", 7'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
