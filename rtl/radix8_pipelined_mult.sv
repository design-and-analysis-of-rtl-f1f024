// radix8_pipelined_mult: three-stage pipelined N x N multiplier built on
// radix-8 modified Booth encoding (N = 32 by default).
//
//   stage 1  operand_reg    registers multiplicand and multiplier
//            booth8_ppr_gen makes the multiples of X (3X with a CLA) and the
//                           R = 11 partial product rows through 16:1 muxes
//   stage 2  ppr_reg        registers the 11 x 35-bit rows (385 flip-flops)
//            ppr_tree_adder (TREE = 1) or ppr_seq_adder (TREE = 0) sums the
//                           shifted rows with ten carry look-ahead adders
//   stage 3  product_reg    registers the 2N-bit product
//
// Interface: present multiplicand, multiplier and in_valid before a rising
// edge; product and out_valid show the result three rising edges later. A new
// operand pair is accepted every cycle; there is no stall and no feedback.
// SIGNED = 1 treats the operands as two's complement, SIGNED = 0 as
// unsigned. rst is synchronous and active high and clears every register.
//
// The three registers, the radix-8 encoding with 11 rows of 35 bits and the
// two CLA addition structures follow the design description, with the tree
// as the default. The valid flag, the reset style, the SIGNED option and the
// 2N-bit product width are this design's choices.
module radix8_pipelined_mult
  import radix8_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter bit          SIGNED = 1'b1,
  parameter bit          TREE   = 1'b1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic           out_valid,
  output logic [2*N-1:0] product
);

  localparam int unsigned W = ppr_width(N);
  localparam int unsigned R = num_ppr(N);

  // stage 1
  logic         v1;
  logic [N-1:0] x1, y1;

  operand_reg #(.N(N)) u_operand_reg (
    .clk, .rst, .in_valid,
    .x_in   (multiplicand),
    .y_in   (multiplier),
    .valid_q(v1),
    .x_q    (x1),
    .y_q    (y1)
  );

  logic [W-1:0] ppr_d [R];

  booth8_ppr_gen #(.N(N), .SIGNED(SIGNED)) u_ppr_gen (
    .x  (x1),
    .y  (y1),
    .ppr(ppr_d)
  );

  // stage 2
  logic         v2;
  logic [W-1:0] ppr_q [R];

  ppr_reg #(.N(N)) u_ppr_reg (
    .clk, .rst,
    .in_valid(v1),
    .ppr_d,
    .valid_q (v2),
    .ppr_q
  );

  logic [2*N-1:0] sum;

  if (TREE) begin : g_tree
    ppr_tree_adder #(.N(N)) u_add (.ppr(ppr_q), .product(sum));
  end else begin : g_seq
    ppr_seq_adder #(.N(N)) u_add (.ppr(ppr_q), .product(sum));
  end

  // stage 3
  product_reg #(.N(N)) u_product_reg (
    .clk, .rst,
    .in_valid(v2),
    .p_d     (sum),
    .valid_q (out_valid),
    .p_q     (product)
  );

endmodule
