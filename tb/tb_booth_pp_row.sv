// tb_booth_pp_row: exhaustive test of booth_pp_row: for every multiplier bit
// triplet and every 9-bit multiplicand, the row value row + neg must equal
// digit * A, with the Booth digit worked out from the recoding table
// digit = -2*b[2k+1] + b[2k] + b[2k-1].
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_booth_pp_row;
  import rwtm_pkg::*;
  localparam int WATCHDOG_CYCLES = 2000;
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

  logic [2:0] bits;
  logic [8:0] a;
  booth_digit_t digit;
  logic [9:0] row;
  logic neg;
  int d, val;
  booth_pp_row dut (.bits(bits), .a(a), .digit(digit), .row(row), .neg(neg));

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int x = 0; x < 512; x++) begin
        bits = 3'(t);
        a = 9'(x);
        #1;
        d = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
        val = int'($signed(row)) + int'(neg);
        check(val == d * int'($signed(a)), $sformatf("booth bits=%03b a=%0d got %0d", bits, $signed(a), val));
        if (x == 0)
          check(((d < 0) == digit.neg) && ((d == 1 || d == -1) == digit.one)
                && ((d == 2 || d == -2) == digit.two),
                $sformatf("digit encoding bits=%03b", bits));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
