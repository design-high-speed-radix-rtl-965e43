// W x W unsigned Vedic (Urdhva Tiryagbhyam, "vertically and crosswise")
// multiplier.
//
// Each operand is split into halves of H = W/2 bits. Four H x H products are
// formed: high*high, low*high, high*low and low*low. They are combined with
// three W-bit CBL adders exactly as in the published 8-bit structure:
//   adder 1: (a_lo*b_hi) + (a_hi*b_lo)                    -> s1, carry c1
//   adder 2: s1 + {0, upper half of a_lo*b_lo}            -> s2, carry c2
//   adder 3: (a_hi*b_hi) + {0.., c1|c2, upper half of s2} -> s3, carry c3
//   p = {s3, lower half of s2, lower half of a_lo*b_lo}
// c1 and c2 cannot both be 1, so an OR gate merges them. c3 is brought out as
// in the diagram; for a correct product it is always 0.
//
// The split is repeated until the pieces are LEAF_W bits wide. The tree is
// built bottom-up in generate levels: level 0 holds the (W/LEAF_W)^2 leaf
// products of every pair of LEAF_W-bit pieces of a and b, made by radix-4
// Booth multipliers in unsigned mode; level l combines four products of
// level l-1 into one product of twice the width with the three adders above.
// Using an ordinary multiplier for the short pieces this combines the Vedic decomposition for
// long words with an ordinary multiplier for short ones. LEAF_W = 8 uses
// Booth for the 8x8 products; LEAF_W = 4 with W = 8 gives the published 8-bit
// diagram with 4x4 leaves. The c3 of the inner nodes is left unused. W must be LEAF_W times a power of two.
// Purely combinational.
module vedic_mult #(
  parameter int unsigned W      = 32,
  parameter int unsigned LEAF_W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p,
  output logic           c3
);
  localparam int unsigned D  = W / LEAF_W;   // leaf pieces per operand
  localparam int unsigned LV = $clog2(D);    // number of combining levels

  if (W < LEAF_W || (LEAF_W << LV) != W || LEAF_W % 2 != 0) begin : g_bad_width
    $error("vedic_mult: W must be LEAF_W times a power of two, LEAF_W even");
  end

  for (genvar l = 0; l <= LV; l++) begin : g_lv
    localparam int unsigned C  = LEAF_W << l;  // piece width at this level
    localparam int unsigned DL = D >> l;       // pieces per operand
    for (genvar i = 0; i < DL; i++) begin : g_i      // piece of a
      for (genvar j = 0; j < DL; j++) begin : g_j    // piece of b
        logic [2*C-1:0] prod;                      // a piece i * b piece j
        logic           cy;                        // c3 of this node

        if (l == 0) begin : g_leaf
          booth_mult #(.W(LEAF_W)) u_booth (
            .a  (a[i*C +: C]),
            .b  (b[j*C +: C]),
            .sgn(1'b0),
            .p  (prod)
          );
          assign cy = 1'b0;
        end else begin : g_node
          localparam int unsigned H = C / 2;
          logic [C-1:0] q_hh, q_lh, q_hl, q_ll;  // the four half-size products
          logic [C-1:0] s1, s2, s3;
          logic [C-1:0] add2_b, add3_b;
          logic         c1, c2;

          assign q_hh = g_lv[l-1].g_i[2*i+1].g_j[2*j+1].prod;
          assign q_lh = g_lv[l-1].g_i[2*i  ].g_j[2*j+1].prod;
          assign q_hl = g_lv[l-1].g_i[2*i+1].g_j[2*j  ].prod;
          assign q_ll = g_lv[l-1].g_i[2*i  ].g_j[2*j  ].prod;

          cbl_adder #(.W(C)) u_add1 (
            .a(q_lh), .b(q_hl), .cin(1'b0), .sum(s1), .cout(c1));

          assign add2_b = {{H{1'b0}}, q_ll[C-1:H]};
          cbl_adder #(.W(C)) u_add2 (
            .a(s1), .b(add2_b), .cin(1'b0), .sum(s2), .cout(c2));

          assign add3_b = {{(H-1){1'b0}}, c1 | c2, s2[C-1:H]};
          cbl_adder #(.W(C)) u_add3 (
            .a(q_hh), .b(add3_b), .cin(1'b0), .sum(s3), .cout(cy));

          assign prod = {s3, s2[H-1:0], q_ll[H-1:0]};
        end
      end
    end
  end

  assign p  = g_lv[LV].g_i[0].g_j[0].prod;
  assign c3 = g_lv[LV].g_i[0].g_j[0].cy;
endmodule
