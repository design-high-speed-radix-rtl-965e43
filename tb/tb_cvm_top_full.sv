// Full-size testbench for cvm_top with every parameter at its default
// (32-bit operands, 8-bit Booth leaves, four-multiplier arrangement).
// It applies the published example (12 + j5)(2 + j4), whose outputs must be
// pr = 4 and pi = 58, then extreme and random operands against a 67-bit
// signed reference.
module tb_cvm_top_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] ar, ai, br, bi;
  logic [63:0] pr, pi;
  logic        pr_neg, pi_cout;

  cvm_top u_dut (
    .ar(ar), .ai(ai), .br(br), .bi(bi),
    .pr(pr), .pi(pi), .pr_neg(pr_neg), .pi_cout(pi_cout));

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
      $display("FAIL (%h + j%h)(%h + j%h)", xr, xi, yr, yi);
    end
  endtask

  initial begin
    ar = 32'd12; ai = 32'd5; br = 32'd2; bi = 32'd4;
    #1;
    checks++;
    if (pr !== 64'd4 || pi !== 64'd58 || pr_neg || pi_cout) begin
      failures++;
      $display("FAIL example: pr=%0d pi=%0d", pr, pi);
    end
    check('1, '1, '1, '1);
    check(0, '1, 0, '1);
    for (int n = 0; n < 1000; n++) check($urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
