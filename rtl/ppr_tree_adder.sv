// ppr_tree_adder: tree of carry look-ahead adders summing the partial
// product rows (the tree-based addition of the design).
//
// Row k is sign-extended and shifted 3k bits left. The rows are then summed
// by R-1 CLAs arranged by level: neighbouring rows are added in pairs, and
// when a level has an odd count its last node is added to the sum of the
// level's last pair. For the 11 rows of a 32-bit multiplier this gives ten
// adders:
//   level 1: r0+r1, r2+r3, r4+r5, r6+r7, r8+r9, then (r8+r9)+r10
//   level 2: (r0..r3), (r4..r7), then (r4..r7)+(r8..r10)
//   level 3: (r0..r3)+(r4..r10) -> product
// Each adder is only as wide as its operands need: the bits below the upper
// operand's shift are copied from the lower operand, and the top is bounded
// by the largest value the covered rows can reach (capped at 2N bits). For
// N = 32, r0+r1 spans bits 38..0, of which bits 2..0 pass straight from r0
// and a 36-bit CLA forms bits 38..3; the ten CLAs are 34 to 52 bits wide.
// Purely combinational; sits between the row register and product register.
//
// Five first-level adders, one adder for the eleventh row and ten adders in
// all follow the design description; the grouping above the first level and
// the exact adder widths are this design's choice.
module ppr_tree_adder
  import radix8_pkg::*;
#(
  parameter int unsigned N  = 32,
  localparam int unsigned W = ppr_width(N),
  localparam int unsigned R = num_ppr(N),
  localparam int unsigned P = 2 * N
) (
  input  logic [W-1:0] ppr [R],
  output logic [P-1:0] product
);

  // node value, aligned to its row weight and sign-extended to P bits
  wire [P-1:0] node [2*R-1];

  for (genvar i = 0; i < int'(R); i++) begin : g_rowin
    logic [P+3*R+W-1:0] ext;
    always_comb begin
      ext = {{(P + 3*R){ppr[i][W-1]}}, ppr[i]};
      ext = ext << (3 * i);
    end
    assign node[i] = ext[P-1:0];
  end

  for (genvar k = 0; k < int'(R) - 1; k++) begin : g_add
    localparam int SA   = tree_plan(R, k, 0);
    localparam int SB   = tree_plan(R, k, 1);
    localparam int OUT  = R + k;
    localparam int OFFB = 3 * tree_plan(R, SB, 2);
    localparam int TOPC = N + 3 + 3 * tree_plan(R, OUT, 3);
    localparam int TOP  = (TOPC > P - 1) ? P - 1 : TOPC;
    localparam int AW   = TOP - OFFB + 1;

    logic [AW-1:0] s;
    logic [P-1:0]  v;

    cla_adder #(.W(AW)) u_cla (
      .a   (node[SA][TOP:OFFB]),
      .b   (node[SB][TOP:OFFB]),
      .cin (1'b0),
      .sum (s),
      .cout()
    );

    always_comb begin
      for (int i = 0; i < int'(P); i++) begin
        if (i < OFFB)      v[i] = node[SA][i];
        else if (i <= TOP) v[i] = s[i-OFFB];
        else               v[i] = s[AW-1];
      end
    end
    assign node[OUT] = v;
  end

  assign product = node[2*R-2];

endmodule
