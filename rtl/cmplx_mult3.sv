// Complex multiplier with three N x N Vedic multipliers.
//
// The four products of the direct form are traded for three products and
// some pre- and post-additions:
//   pr = ar*(br + bi) - bi*(ar + ai)
//   pi = ar*(br + bi) + br*(ai - ar)
// The common product m1 = ar*(br + bi) is shared by both outputs.
//
// The pre-added operands are N+1 bits wide (br+bi and ar+ai carry one more
// bit; ai-ar is signed), while the Vedic multiplier is N x N. Each product
// is therefore formed as the N x N product of the low N bits plus a
// correction for the top bit: x*s = x*s[N-1:0] + s[N]*(x << N) for the
// unsigned sums, and br*d = br*d[N-1:0] - d[N]*(br << N) for the signed
// difference d. The corrections and the final adder and subtractor use CBL
// adders. Operands are unsigned; outputs match cmplx_mult4: pr and pi are
// 2N bits, {pr_neg, pr} is the exact real part in (2N+1)-bit two's
// complement and {pi_cout, pi} the exact imaginary part unsigned.
// Purely combinational.
module cmplx_mult3 #(
  parameter int unsigned N      = 32,
  parameter int unsigned LEAF_W = 8
) (
  input  logic [N-1:0]   ar,
  input  logic [N-1:0]   ai,
  input  logic [N-1:0]   br,
  input  logic [N-1:0]   bi,
  output logic [2*N-1:0] pr,
  output logic [2*N-1:0] pi,
  output logic           pr_neg,
  output logic           pi_cout
);
  localparam int unsigned PW = 2 * N + 2;  // width of the final add/subtract

  // Pre-adders: sb = br + bi, sa = ar + ai, d = ai - ar (all N+1 bits).
  logic [N-1:0] sb_lo, sa_lo, d_lo;
  logic         sb_hi, sa_hi, d_borrow;

  cbl_adder #(.W(N)) u_pre_sb (
    .a(br), .b(bi), .cin(1'b0), .sum(sb_lo), .cout(sb_hi));
  cbl_adder #(.W(N)) u_pre_sa (
    .a(ar), .b(ai), .cin(1'b0), .sum(sa_lo), .cout(sa_hi));
  cbl_subtractor #(.W(N)) u_pre_d (
    .a(ai), .b(ar), .diff(d_lo), .borrow(d_borrow));

  // Three N x N Vedic products of the low N bits.
  logic [2*N-1:0] v1, v2, v3;
  logic           unused_c3 [3];

  vedic_mult #(.W(N), .LEAF_W(LEAF_W)) u_m1 (
    .a(ar), .b(sb_lo), .p(v1), .c3(unused_c3[0]));
  vedic_mult #(.W(N), .LEAF_W(LEAF_W)) u_m2 (
    .a(br), .b(d_lo),  .p(v2), .c3(unused_c3[1]));
  vedic_mult #(.W(N), .LEAF_W(LEAF_W)) u_m3 (
    .a(bi), .b(sa_lo), .p(v3), .c3(unused_c3[2]));

  // Top-bit corrections, 2N+1 bits wide.
  logic [2*N:0] v1_x, v2_x, v3_x;       // products, zero-extended
  logic [2*N:0] k1, k2, k3;             // (x << N) gated by the top bit
  logic [2*N:0] m1, m2, m3;             // m1, m3 unsigned; m2 signed
  logic         unused_co1, unused_co3, unused_bo2;

  assign v1_x = {1'b0, v1};
  assign v2_x = {1'b0, v2};
  assign v3_x = {1'b0, v3};
  assign k1   = {1'b0, ar & {N{sb_hi}},    {N{1'b0}}};
  assign k2   = {1'b0, br & {N{d_borrow}}, {N{1'b0}}};
  assign k3   = {1'b0, bi & {N{sa_hi}},    {N{1'b0}}};

  cbl_adder #(.W(2*N+1)) u_fix1 (
    .a(v1_x), .b(k1), .cin(1'b0), .sum(m1), .cout(unused_co1));
  cbl_subtractor #(.W(2*N+1)) u_fix2 (
    .a(v2_x), .b(k2), .diff(m2), .borrow(unused_bo2));
  cbl_adder #(.W(2*N+1)) u_fix3 (
    .a(v3_x), .b(k3), .cin(1'b0), .sum(m3), .cout(unused_co3));

  // Post-adders: pr = m1 - m3, pi = m1 + m2, in 2N+2 bits.
  logic [PW-1:0] m1_x, m2_x, m3_x, pr_full, pi_full;
  logic          unused_bo_pr, unused_co_pi;

  assign m1_x = {1'b0, m1};
  assign m3_x = {1'b0, m3};
  assign m2_x = {m2[2*N], m2};

  cbl_subtractor #(.W(PW)) u_sub_pr (
    .a(m1_x), .b(m3_x), .diff(pr_full), .borrow(unused_bo_pr));
  cbl_adder #(.W(PW)) u_add_pi (
    .a(m1_x), .b(m2_x), .cin(1'b0), .sum(pi_full), .cout(unused_co_pi));

  assign pr      = pr_full[2*N-1:0];
  assign pr_neg  = pr_full[2*N];
  assign pi      = pi_full[2*N-1:0];
  assign pi_cout = pi_full[2*N];
endmodule
