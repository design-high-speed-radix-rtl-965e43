// Radix-4 complex Vedic multiplier: top level.
//
// Multiplies two complex numbers A = ar + j*ai and B = br + j*bi whose parts
// are unsigned N-bit integers (N = 32 by default) and returns
//   pr = ar*br - ai*bi,   pi = ar*bi + ai*br
// as 2N-bit words, with pr_neg and pi_cout extending them to exact
// (2N+1)-bit results (see cmplx_mult4). Each real product is an N x N Vedic
// multiplier that splits its operands in halves down to LEAF_W-bit pieces,
// which are multiplied by radix-4 Booth multipliers; every addition uses the
// common-Boolean-logic (CBL) adder.
//
// THREE_MULT selects the arrangement: 0 (default) is the four-multiplier
// form that the published 32-bit results are for; 1 is the three-multiplier
// form with pre-adders. Both give the same outputs. Purely combinational:
// the outputs follow the inputs after the adder and multiplier delays.
module cvm_top #(
  parameter int unsigned N          = 32,
  parameter int unsigned LEAF_W     = 8,
  parameter bit          THREE_MULT = 1'b0
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
  if (THREE_MULT) begin : g_three
    cmplx_mult3 #(.N(N), .LEAF_W(LEAF_W)) u_cm (
      .ar(ar), .ai(ai), .br(br), .bi(bi),
      .pr(pr), .pi(pi), .pr_neg(pr_neg), .pi_cout(pi_cout));
  end else begin : g_four
    cmplx_mult4 #(.N(N), .LEAF_W(LEAF_W)) u_cm (
      .ar(ar), .ai(ai), .br(br), .bi(bi),
      .pr(pr), .pi(pi), .pr_neg(pr_neg), .pi_cout(pi_cout));
  end
endmodule
