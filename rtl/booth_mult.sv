// W x W radix-4 Booth multiplier, for signed or unsigned operands.
//
// The multiplier b gets a 0 appended below its LSB and is cut into
// overlapping 3-bit groups {b(2k+1), b(2k), b(2k-1)}; the MSB of one group is
// the LSB of the next. Each group is encoded (booth_enc) into a choice of
// 0, +/-A or +/-2A, which halves the number of partial-product rows compared
// with one row per multiplier bit. Rows are accumulated one after another in
// 2W-bit CBL adders, one adder stage per group.
//
// Signed and unsigned operation: sgn = 1 reads a and b as two's-complement
// numbers, sgn = 0 as unsigned. b is extended by two bits (its sign bit, or
// zeros) so that there are W/2 + 1 groups; in signed mode the extra top group
// is always 000 or 111 and contributes nothing, so a signed 8-bit product uses
// the four groups of the published grouping, while an unsigned one needs the
// fifth group to add the weight of b(W-1). A negated row is formed as the
// bitwise inverse of the shifted row plus a carry-in of 1 into its adder.
//
// Interface: p is the full 2W-bit product (signed or unsigned per sgn).
// W must be even. Purely combinational.
module booth_mult
  import cvm_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           sgn,
  output logic [2*W-1:0] p
);
  localparam int unsigned G  = W / 2 + 1;  // number of Booth groups
  localparam int unsigned PW = 2 * W;      // product width

  if (W % 2 != 0 || W < 2) begin : g_bad_width
    $error("booth_mult: W must be even and at least 2");
  end

  logic          a_ext;                // extension bit of a
  logic          b_ext;                // extension bit of b
  logic [W+1:0]  ax;                   // a extended to W+2 bits
  logic [W+2:0]  bz;                   // {b extended to W+2 bits, appended 0}

  assign a_ext = sgn & a[W-1];
  assign b_ext = sgn & b[W-1];
  assign ax    = {a_ext, a_ext, a};
  assign bz    = {b_ext, b_ext, b, 1'b0};

  booth_sel_t       sel  [G];
  logic [PW-1:0]    row  [G];          // partial-product row, already shifted
  logic [PW-1:0]    acc  [G+1];        // running sum after each stage
  logic             unused_cout [G];   // carries out of the 2W-bit adders (discarded)

  assign acc[0] = '0;

  for (genvar k = 0; k < G; k++) begin : g_grp
    logic [W+1:0]  mult;               // selected multiple: 0, A or 2A
    logic [PW-1:0] mult_ext;           // sign-extended to the product width

    booth_enc u_enc (
      .grp(bz[2*k+2 : 2*k]),
      .sel(sel[k])
    );

    always_comb begin
      if (sel[k].two)      mult = {ax[W:0], 1'b0};
      else if (sel[k].one) mult = ax;
      else                 mult = '0;
      mult_ext = {{(PW-W-2){mult[W+1]}}, mult};
      row[k]   = (mult_ext << (2*k)) ^ {PW{sel[k].neg}};
    end

    cbl_adder #(.W(PW)) u_add (
      .a   (acc[k]),
      .b   (row[k]),
      .cin (sel[k].neg),
      .sum (acc[k+1]),
      .cout(unused_cout[k])
    );
  end

  assign p = acc[G];
endmodule
