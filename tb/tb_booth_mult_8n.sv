// tb_booth_mult_8n: test of booth_mult_8n at its default size (NB = 2, a
// 16x16 multiplier of four 8x8 units) and at NB = 3 (24x24, nine units), in
// both precisions, signed and unsigned: corner operands (0, 1, -1, most
// negative, most positive, mixed bytes) and random operands. Single mode must
// give the full product a*b; lane mode must give each byte lane's own 8x8
// product in its 16 bits. Counts how often each mode/sign combination was
// used and fails if one never was.
// Ends with a TB_RESULT line; a watchdog stops it after a fixed number of
// clock cycles and counts that as a failure.
module tb_booth_mult_8n;
  import rwtm_pkg::*;
  localparam int WATCHDOG_CYCLES = 100000;
  localparam int NRAND = 15000;

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

  // Default size.
  logic [15:0] a2, b2;
  logic [31:0] p2;
  // Three bytes.
  logic [23:0] a3, b3;
  logic [47:0] p3;
  logic        tc;
  bm_mode_e    mode;
  int          used [4] = '{0, 0, 0, 0};

  booth_mult_8n           dut2 (.a(a2), .b(b2), .tc(tc), .mode(mode), .p(p2));
  booth_mult_8n #(.NB(3)) dut3 (.a(a3), .b(b3), .tc(tc), .mode(mode), .p(p3));

  // Reference: operands of nb bytes, held in the low bits of 64-bit words.
  function automatic logic [63:0] ref_prod(logic [63:0] a, logic [63:0] b,
                                           int nb, logic tc, bm_mode_e mode);
    longint av, bv;
    logic [63:0] r;
    int sh;
    if (mode == BM_SINGLE) begin
      sh = 64 - 8 * nb;
      av = tc ? (longint'(a << sh) >>> sh) : longint'(a);
      bv = tc ? (longint'(b << sh) >>> sh) : longint'(b);
      return 64'(av * bv);
    end
    r = '0;
    for (int l = 0; l < nb; l++) begin
      av = tc ? longint'($signed(a[8*l +: 8])) : longint'(a[8*l +: 8]);
      bv = tc ? longint'($signed(b[8*l +: 8])) : longint'(b[8*l +: 8]);
      r[16*l +: 16] = 16'(av * bv);
    end
    return r;
  endfunction

  task automatic run_one(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] e2, e3;
    a2 = a[15:0]; b2 = b[15:0];
    a3 = a[23:0]; b3 = b[23:0];
    #1;
    used[{mode == BM_LANES8, tc}]++;
    e2 = ref_prod(64'(a2), 64'(b2), 2, tc, mode);
    e3 = ref_prod(64'(a3), 64'(b3), 3, tc, mode);
    check(p2 == e2[31:0], $sformatf("NB=2 mode=%0d tc=%0d a=%0h b=%0h got %0h exp %0h",
                                    mode, tc, a2, b2, p2, e2[31:0]));
    check(p3 == e3[47:0], $sformatf("NB=3 mode=%0d tc=%0d a=%0h b=%0h got %0h exp %0h",
                                    mode, tc, a3, b3, p3, e3[47:0]));
  endtask

  logic [63:0] corners [8] = '{64'h000000, 64'h000001, 64'hFFFFFF, 64'h800000,
                               64'h7FFFFF, 64'h008000, 64'h80FF00, 64'h00FF7F};

  initial begin
    tc = 1'b0;
    mode = BM_SINGLE;
    for (int m = 0; m < 2; m++)
      for (int t = 0; t < 2; t++) begin
        mode = (m != 0) ? BM_LANES8 : BM_SINGLE;
        tc = 1'(t);
        foreach (corners[i])
          foreach (corners[j]) begin
            // The same patterns with their sign byte at bit 15 for NB = 2.
            run_one(corners[i], corners[j]);
            run_one(corners[i] >> 8, corners[j] >> 8);
          end
        for (int r = 0; r < NRAND; r++)
          run_one({$urandom, $urandom}, {$urandom, $urandom});
      end
    foreach (used[k]) check(used[k] > 0, $sformatf("mode/sign combination %0d never used", k));
    $display("uses: single/unsigned=%0d single/signed=%0d lanes/unsigned=%0d lanes/signed=%0d",
             used[0], used[1], used[2], used[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
