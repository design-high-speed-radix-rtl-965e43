// One bit of the common-Boolean-logic (CBL) adder.
//
// Both candidate results are formed before the carry arrives: for a carry-in
// of 0 the sum is a^b and the carry a&b; for a carry-in of 1 the sum is the
// inverse of a^b and the carry a|b. The incoming carry then only steers two
// 2:1 multiplexers, so the carry path through a cell is a single mux. This
// follows the published cell diagram (XOR, inverter, AND, OR and two
// multiplexers). Purely combinational.
module cbl_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic x;      // a ^ b: the sum for cin = 0
  logic x_n;    // its inverse: the sum for cin = 1
  logic c_and;  // carry for cin = 0
  logic c_or;   // carry for cin = 1

  always_comb begin
    x     = a ^ b;
    x_n   = ~x;
    c_and = a & b;
    c_or  = a | b;
    sum   = cin ? x_n  : x;
    cout  = cin ? c_or : c_and;
  end
endmodule
