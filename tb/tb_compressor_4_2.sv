// tb_compressor_4_2: exhaustive test of compressor_4_2: for all 32 input patterns the
// outputs must satisfy x1+x2+x3+x4+cin = sum + 2*(carry+cout), and cout must
// not depend on cin (so that a row of compressors does not ripple).
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_compressor_4_2;
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

  logic x1, x2, x3, x4, cin, sum, carry, cout, cout_c0;
  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin
    for (int i = 0; i < 32; i++) begin
      {x1, x2, x3, x4, cin} = 5'(i);
      #1;
      check(int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)
            == int'(sum) + 2 * (int'(carry) + int'(cout)),
            $sformatf("c42 in=%05b", 5'(i)));
      if (cin) begin
        cout_c0 = cout;
        cin = 1'b0;
        #1;
        check(cout == cout_c0, $sformatf("c42 cout depends on cin, in=%05b", 5'(i)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
