// Radix-4 Booth encoder for one overlapping 3-bit group of the multiplier.
//
// grp = {B(i+1), B(i), B(i-1)}. The output follows the Booth truth table:
//   000 +0, 001 +A, 010 +A, 011 +2A, 100 -2A, 101 -A, 110 -A, 111 -0,
// with neg = B(i+1), one = B(i) xor B(i-1), and two set for 011 and 100.
// Purely combinational.
module booth_enc
  import cvm_pkg::*;
(
  input  logic [2:0]  grp,
  output booth_sel_t  sel
);
  always_comb begin
    sel.neg = grp[2];
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp == 3'b011) || (grp == 3'b100);
  end
endmodule
