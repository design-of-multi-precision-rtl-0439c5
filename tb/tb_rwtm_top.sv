// tb_rwtm_top: end-to-end test of rwtm_top at its default configuration.
// Operands are driven on the falling clock edge and every registered result
// is checked one rising edge later, which also checks the one-cycle latency
// and the one-result-per-cycle rate. The stream mixes both Wallace
// precisions (with the mode switching from operation to operation), both
// Booth precisions with signed and unsigned operands, idle cycles in which
// an output must hold its last value, and a reset in mid-stream. Each of
// these mechanisms is counted, and one that never happened is a failure.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_rwtm_top;
  import rwtm_pkg::*;
  localparam int WATCHDOG_CYCLES = 50000;
  localparam int NOPS = 20000;

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

  logic        rst_n;
  logic        wt_valid_i, wt_valid_o;
  logic [7:0]  wt_a, wt_b;
  wt_prec_e    wt_prec;
  logic [15:0] wt_p;
  logic [2:0]  wt_levels_on;
  logic        bm_valid_i, bm_valid_o;
  logic [15:0] bm_a, bm_b;
  logic        bm_tc;
  bm_mode_e    bm_mode;
  logic [31:0] bm_p;

  rwtm_top dut (.*);

  // Expected values of the registered outputs after the next rising edge.
  logic        exp_wt_valid, exp_bm_valid;
  logic [15:0] exp_wt_p;
  logic [2:0]  exp_wt_lv;
  logic [31:0] exp_bm_p;
  wt_prec_e    last_prec;

  // Mechanism counters.
  int n_wt4 = 0, n_wt8 = 0, n_wt_switch = 0, n_wt_idle = 0;
  int n_bm16u = 0, n_bm16s = 0, n_bm8u = 0, n_bm8s = 0, n_bm_idle = 0, n_reset = 0;

  function automatic logic [31:0] booth_ref(logic [15:0] a, logic [15:0] b,
                                            logic tc, bm_mode_e mode);
    longint av, bv;
    int lo, hi;
    if (mode == BM_SINGLE) begin
      av = tc ? longint'($signed(a)) : longint'(a);
      bv = tc ? longint'($signed(b)) : longint'(b);
      return 32'(av * bv);
    end
    lo = tc ? int'($signed(a[7:0])) * int'($signed(b[7:0])) : int'(a[7:0]) * int'(b[7:0]);
    hi = tc ? int'($signed(a[15:8])) * int'($signed(b[15:8])) : int'(a[15:8]) * int'(b[15:8]);
    return {16'(hi), 16'(lo)};
  endfunction

  task automatic check_outputs(input int op);
    check(wt_valid_o == exp_wt_valid, $sformatf("op %0d wt_valid_o", op));
    check(bm_valid_o == exp_bm_valid, $sformatf("op %0d bm_valid_o", op));
    check(wt_p == exp_wt_p, $sformatf("op %0d wt_p got %0h exp %0h", op, wt_p, exp_wt_p));
    check(wt_levels_on == exp_wt_lv, $sformatf("op %0d wt_levels_on", op));
    check(bm_p == exp_bm_p, $sformatf("op %0d bm_p got %0h exp %0h", op, bm_p, exp_bm_p));
  endtask

  task automatic apply_reset();
    rst_n = 1'b0;
    @(posedge clk);
    @(negedge clk);
    exp_wt_valid = 1'b0; exp_bm_valid = 1'b0;
    exp_wt_p = '0; exp_wt_lv = '0; exp_bm_p = '0;
    check_outputs(-1);
    rst_n = 1'b1;
    n_reset++;
  endtask

  initial begin
    wt_valid_i = 1'b0; bm_valid_i = 1'b0;
    wt_a = '0; wt_b = '0; wt_prec = PREC_8BIT; last_prec = PREC_8BIT;
    bm_a = '0; bm_b = '0; bm_tc = 1'b0; bm_mode = BM_SINGLE;
    @(negedge clk);
    apply_reset();

    for (int op = 0; op < NOPS; op++) begin
      if (op == NOPS / 2) apply_reset();

      // Drive one operation on each side (or an idle cycle).
      wt_valid_i = ($urandom_range(7) != 0);
      bm_valid_i = ($urandom_range(7) != 0);
      wt_a = 8'($urandom); wt_b = 8'($urandom);
      wt_prec = ($urandom_range(1) != 0) ? PREC_8BIT : PREC_4BIT;
      bm_a = 16'($urandom); bm_b = 16'($urandom);
      bm_tc = 1'($urandom);
      bm_mode = ($urandom_range(1) != 0) ? BM_LANES8 : BM_SINGLE;

      exp_wt_valid = wt_valid_i;
      exp_bm_valid = bm_valid_i;
      if (wt_valid_i) begin
        if (wt_prec == PREC_8BIT) begin
          exp_wt_p = 16'(int'(wt_a) * int'(wt_b));
          exp_wt_lv = 3'b111;
          n_wt8++;
        end else begin
          exp_wt_p = 16'(int'(wt_a[3:0]) * int'(wt_b[3:0]));
          exp_wt_lv = 3'b001;
          n_wt4++;
        end
        if (wt_prec != last_prec) n_wt_switch++;
        last_prec = wt_prec;
      end else begin
        n_wt_idle++;
      end
      if (bm_valid_i) begin
        exp_bm_p = booth_ref(bm_a, bm_b, bm_tc, bm_mode);
        case ({bm_mode == BM_LANES8, bm_tc})
          2'b00:   n_bm16u++;
          2'b01:   n_bm16s++;
          2'b10:   n_bm8u++;
          default: n_bm8s++;
        endcase
      end else begin
        n_bm_idle++;
      end

      @(posedge clk);
      @(negedge clk);
      check_outputs(op);
    end

    check(n_wt4 > 0,       "Wallace 4-bit mode never used");
    check(n_wt8 > 0,       "Wallace 8-bit mode never used");
    check(n_wt_switch > 0, "Wallace precision never switched");
    check(n_wt_idle > 0,   "Wallace idle cycle never happened");
    check(n_bm16u > 0,     "Booth 16x16 unsigned never used");
    check(n_bm16s > 0,     "Booth 16x16 signed never used");
    check(n_bm8u > 0,      "Booth dual 8x8 unsigned never used");
    check(n_bm8s > 0,      "Booth dual 8x8 signed never used");
    check(n_bm_idle > 0,   "Booth idle cycle never happened");
    check(n_reset > 1,     "mid-stream reset never happened");
    $display("wallace: 4-bit=%0d 8-bit=%0d switches=%0d idle=%0d",
             n_wt4, n_wt8, n_wt_switch, n_wt_idle);
    $display("booth: 16u=%0d 16s=%0d 8u=%0d 8s=%0d idle=%0d resets=%0d",
             n_bm16u, n_bm16s, n_bm8u, n_bm8s, n_bm_idle, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
