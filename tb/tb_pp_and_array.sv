// tb_pp_and_array: checks every partial-product bit of pp_and_array (N = 8) for
// random operands and all-ones/zero corners, and that the weighted sum of the
// bits equals a * b.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_pp_and_array;
  localparam int WATCHDOG_CYCLES = 100000;
  localparam int N = 8;
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

  logic [N-1:0] a, b;
  logic [N-1:0][N-1:0] pp;
  int unsigned total;
  pp_and_array #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = N'($urandom); b = N'($urandom);
      if (t == 0) begin a = '1; b = '1; end
      if (t == 1) begin a = '0; b = '1; end
      #1;
      total = 0;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          check(pp[j][i] == (a[i] & b[j]), $sformatf("pp[%0d][%0d] a=%0h b=%0h", j, i, a, b));
          total += int'(pp[j][i]) << (i + j);
        end
      check(total == int'(a) * int'(b), $sformatf("pp sum a=%0h b=%0h", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
