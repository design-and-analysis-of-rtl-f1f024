// ppr_seq_adder: sequential (chained) carry look-ahead addition of the
// partial product rows.
//
// Row 0, sign-extended to 2N bits, starts a running sum; each of the next
// R-1 rows is sign-extended, shifted 3k bits left and added to the running
// sum by its own 2N-bit CLA, each adder waiting for the previous one. For 11
// rows that is a chain of ten 64-bit adders. Purely combinational; it is the
// alternative to ppr_tree_adder and has the same interface.
//
// The chain of ten equal-size adders follows the design description; the
// 2N-bit adder width is this design's choice.
module ppr_seq_adder
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

  wire [P-1:0] row [R];   // aligned, sign-extended rows
  wire [P-1:0] acc [R];   // running sums

  for (genvar i = 0; i < int'(R); i++) begin : g_rowin
    logic [P+3*R+W-1:0] ext;
    always_comb begin
      ext = {{(P + 3*R){ppr[i][W-1]}}, ppr[i]};
      ext = ext << (3 * i);
    end
    assign row[i] = ext[P-1:0];
  end

  assign acc[0] = row[0];

  for (genvar k = 1; k < int'(R); k++) begin : g_add
    cla_adder #(.W(P)) u_cla (
      .a   (acc[k-1]),
      .b   (row[k]),
      .cin (1'b0),
      .sum (acc[k]),
      .cout()
    );
  end

  assign product = acc[R-1];

endmodule
