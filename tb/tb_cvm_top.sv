// End-to-end testbench for cvm_top.
// Two full-size (32-bit) tops are run side by side on the same operands: the
// default four-multiplier arrangement and the three-multiplier arrangement
// (THREE_MULT = 1). Both are compared with a 67-bit signed reference. The
// run counts how often each mechanism of the datapath was exercised and
// fails if one never was:
//   - negative real part (pr_neg) and imaginary carry-out (pi_cout);
//   - the two carries c1 and c2 that the 32-bit Vedic node merges with its
//     OR gate;
//   - the three top-bit corrections of the three-multiplier form
//     (carry of br+bi, carry of ar+ai, borrow of ai-ar).
module tb_cvm_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_neg = 0, n_carry = 0, n_c1 = 0, n_c2 = 0, n_sb = 0, n_sa = 0, n_d = 0;

  logic [31:0] ar, ai, br, bi;
  logic [63:0] pr4, pi4, pr3, pi3;
  logic        neg4, cy4, neg3, cy3;

  cvm_top u_dut4 (
    .ar(ar), .ai(ai), .br(br), .bi(bi),
    .pr(pr4), .pi(pi4), .pr_neg(neg4), .pi_cout(cy4));

  cvm_top #(.THREE_MULT(1'b1)) u_dut3 (
    .ar(ar), .ai(ai), .br(br), .bi(bi),
    .pr(pr3), .pi(pi3), .pr_neg(neg3), .pi_cout(cy3));

  task automatic check(input logic [31:0] xr, input logic [31:0] xi,
                       input logic [31:0] yr, input logic [31:0] yi);
    logic signed [66:0] exp_r, exp_i;
    ar = xr; ai = xi; br = yr; bi = yi;
    #1;
    exp_r = 67'(xr) * 67'(yr) - 67'(xi) * 67'(yi);
    exp_i = 67'(xr) * 67'(yi) + 67'(xi) * 67'(yr);
    checks += 2;
    if (67'(signed'({neg4, pr4})) !== exp_r || {2'b00, cy4, pi4} !== exp_i) begin
      failures++;
      $display("FAIL four-mult (%h + j%h)(%h + j%h)", xr, xi, yr, yi);
    end
    if (67'(signed'({neg3, pr3})) !== exp_r || {2'b00, cy3, pi3} !== exp_i) begin
      failures++;
      $display("FAIL three-mult (%h + j%h)(%h + j%h)", xr, xi, yr, yi);
    end
    if (neg4)  n_neg++;
    if (cy4)   n_carry++;
    if (u_dut4.g_four.u_cm.u_m_rr.g_lv[2].g_i[0].g_j[0].g_node.c1) n_c1++;
    if (u_dut4.g_four.u_cm.u_m_rr.g_lv[2].g_i[0].g_j[0].g_node.c2) n_c2++;
    if (u_dut3.g_three.u_cm.sb_hi)    n_sb++;
    if (u_dut3.g_three.u_cm.sa_hi)    n_sa++;
    if (u_dut3.g_three.u_cm.d_borrow) n_d++;
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("%-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    check(12, 5, 2, 4);
    check('1, '1, '1, '1);
    check(0, '1, 0, '1);
    check(32'hffff_0000, 0, 32'h0000_ffff, 0);   // low-high partial products
    check(32'h0002_ffff, 0, 32'hffff_ffff, 0);   // s1 = 0xffffffff: middle adder carries (c2)
    for (int n = 0; n < 4000; n++) check($urandom, $urandom, $urandom, $urandom);
    for (int n = 0; n < 1000; n++)                // small operands
      check($urandom & 32'hff, $urandom & 32'hff, $urandom & 32'hff, $urandom & 32'hff);
    need("negative real part", n_neg);
    need("imaginary carry-out", n_carry);
    need("Vedic node carry c1", n_c1);
    need("Vedic node carry c2", n_c2);
    need("three-mult: br+bi carry", n_sb);
    need("three-mult: ar+ai carry", n_sa);
    need("three-mult: ai-ar negative", n_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
