// W-bit two's-complement subtractor: diff = a - b (mod 2^W).
//
// It is the CBL adder with b inverted and a carry-in of 1. borrow is the
// inverted carry out: it is 1 exactly when b > a taken as unsigned numbers,
// so {borrow, diff} read as a (W+1)-bit two's-complement number is the exact
// difference of two unsigned operands. The subtractor boxes of the complex
// multiplier diagrams give no insides; this construction is the usual one.
// Purely combinational.
module cbl_subtractor #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         borrow
);
  logic [W-1:0] b_n;
  logic         cout;

  assign b_n = ~b;

  cbl_adder #(.W(W)) u_add (
    .a   (a),
    .b   (b_n),
    .cin (1'b1),
    .sum (diff),
    .cout(cout)
  );

  assign borrow = ~cout;
endmodule
