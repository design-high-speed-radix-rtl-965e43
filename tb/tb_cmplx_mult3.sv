// Self-checking testbench for cmplx_mult3 (three-multiplier complex multiplier).
// The default 32-bit instance is driven with the published example
// (12 + j5)(2 + j4) = 4 + j58, with corner operands (all zeros, all ones,
// and cases that make the real part negative or the imaginary part carry
// out of 64 bits) and with random operands. The expected real and imaginary
// parts are computed in 67-bit signed arithmetic and compared with
// {pr_neg, pr} and {pi_cout, pi}. A 16-bit instance with 4-bit leaves gets a
// random sweep as well.
module tb_cmplx_mult3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int neg_seen = 0, carry_seen = 0;

  logic [31:0] ar, ai, br, bi;
  logic [63:0] pr, pi;
  logic        pr_neg, pi_cout;
  logic [15:0] ar16, ai16, br16, bi16;
  logic [31:0] pr16, pi16;
  logic        pr_neg16, pi_cout16;

  cmplx_mult3 u_dut (
    .ar(ar), .ai(ai), .br(br), .bi(bi),
    .pr(pr), .pi(pi), .pr_neg(pr_neg), .pi_cout(pi_cout));

  cmplx_mult3 #(.N(16), .LEAF_W(4)) u_dut16 (
    .ar(ar16), .ai(ai16), .br(br16), .bi(bi16),
    .pr(pr16), .pi(pi16), .pr_neg(pr_neg16), .pi_cout(pi_cout16));

  task automatic check(input logic [31:0] xr, input logic [31:0] xi,
                       input logic [31:0] yr, input logic [31:0] yi);
    logic signed [66:0] exp_r, exp_i;
    ar = xr; ai = xi; br = yr; bi = yi;
    #1;
    exp_r = 67'(xr) * 67'(yr) - 67'(xi) * 67'(yi);
    exp_i = 67'(xr) * 67'(yi) + 67'(xi) * 67'(yr);
    checks++;
    if (67'(signed'({pr_neg, pr})) !== exp_r || {2'b00, pi_cout, pi} !== exp_i) begin
      failures++;
      $display("FAIL (%0d + j%0d)(%0d + j%0d): got %0d%s + j%0d%s",
               xr, xi, yr, yi, pr, pr_neg ? "(neg)" : "", pi, pi_cout ? "(carry)" : "");
    end
    if (pr_neg)  neg_seen++;
    if (pi_cout) carry_seen++;
  endtask

  task automatic check16(input logic [15:0] xr, input logic [15:0] xi,
                         input logic [15:0] yr, input logic [15:0] yi);
    logic signed [34:0] exp_r, exp_i;
    ar16 = xr; ai16 = xi; br16 = yr; bi16 = yi;
    #1;
    exp_r = 35'(xr) * 35'(yr) - 35'(xi) * 35'(yi);
    exp_i = 35'(xr) * 35'(yi) + 35'(xi) * 35'(yr);
    checks++;
    if (35'(signed'({pr_neg16, pr16})) !== exp_r || {2'b00, pi_cout16, pi16} !== exp_i) begin
      failures++;
      $display("FAIL16 (%0d + j%0d)(%0d + j%0d)", xr, xi, yr, yi);
    end
  endtask

  initial begin
    // Published example: expected values 4 and 58 written out independently.
    ar = 32'd12; ai = 32'd5; br = 32'd2; bi = 32'd4;
    #1;
    checks++;
    if (pr !== 64'd4 || pi !== 64'd58 || pr_neg || pi_cout) begin
      failures++;
      $display("FAIL example: pr=%0d pi=%0d", pr, pi);
    end
    check(12, 5, 2, 4);
    check(0, 0, 0, 0);
    check('1, '1, '1, '1);
    check(0, '1, 0, '1);
    check(1, '1, 1, '1);
    check('1, 0, 0, '1);
    check('1, '1, 0, 0);
    for (int n = 0; n < 3000; n++) check($urandom, $urandom, $urandom, $urandom);
    for (int n = 0; n < 3000; n++)
      check16(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    check16('1, '1, '1, '1);
    checks++;
    if (neg_seen == 0 || carry_seen == 0) begin
      failures++;
      $display("FAIL coverage: negative real part %0d times, imaginary carry %0d times",
               neg_seen, carry_seen);
    end
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
