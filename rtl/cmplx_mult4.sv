// Complex multiplier with four N x N Vedic multipliers.
//
// For A = ar + j*ai and B = br + j*bi it computes
//   pr = ar*br - ai*bi      (one Vedic multiplier per product, CBL subtractor)
//   pi = ar*bi + ai*br      (one Vedic multiplier per product, CBL adder)
// All four operands are unsigned N-bit numbers. pr and pi are 2N bits wide,
// as in the published 32-bit design (32-bit inputs, 64-bit outputs). Because
// the exact results need one more bit, two status bits are added here:
// {pr_neg, pr} is the exact real part as a (2N+1)-bit two's-complement number
// (pr_neg = 1 when ai*bi > ar*br), and {pi_cout, pi} the exact imaginary part
// as a (2N+1)-bit unsigned number. Purely combinational.
module cmplx_mult4 #(
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
  logic [2*N-1:0] m_rr, m_ii, m_ri, m_ir;
  logic           unused_c3 [4];

  vedic_mult #(.W(N), .LEAF_W(LEAF_W)) u_m_ri (
    .a(ar), .b(bi), .p(m_ri), .c3(unused_c3[0]));
  vedic_mult #(.W(N), .LEAF_W(LEAF_W)) u_m_ir (
    .a(ai), .b(br), .p(m_ir), .c3(unused_c3[1]));
  vedic_mult #(.W(N), .LEAF_W(LEAF_W)) u_m_rr (
    .a(ar), .b(br), .p(m_rr), .c3(unused_c3[2]));
  vedic_mult #(.W(N), .LEAF_W(LEAF_W)) u_m_ii (
    .a(ai), .b(bi), .p(m_ii), .c3(unused_c3[3]));

  cbl_adder #(.W(2*N)) u_add_pi (
    .a(m_ri), .b(m_ir), .cin(1'b0), .sum(pi), .cout(pi_cout));

  cbl_subtractor #(.W(2*N)) u_sub_pr (
    .a(m_rr), .b(m_ii), .diff(pr), .borrow(pr_neg));
endmodule
