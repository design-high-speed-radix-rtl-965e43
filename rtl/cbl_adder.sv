// W-bit common-Boolean-logic adder: sum = a + b + cin, carry out in cout.
//
// W cbl_cell instances are chained like a ripple-carry adder: the carry out
// of bit k selects the precomputed sum and carry of bit k+1. The default
// width of 8 is that of the adders in the 8-bit Vedic multiplier; the
// multipliers instantiate it at other widths. Purely combinational.
module cbl_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic carry [W+1];

  assign carry[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    cbl_cell u_cell (
      .a   (a[k]),
      .b   (b[k]),
      .cin (carry[k]),
      .sum (sum[k]),
      .cout(carry[k+1])
    );
  end

  assign cout = carry[W];
endmodule
