// booth8_ppr_gen: radix-8 modified Booth partial product row generator.
//
// X is extended to W = N+3 bits (sign or zero extension, by SIGNED). The easy
// multiples 2X and 4X are shifts, the hard multiple 3X = X + 2X is made by a
// carry look-ahead adder, and each negative multiple is its two's complement,
// ~kX + 1, made by a CLA with carry-in 1. The multiplier is extended by one
// bit above its MSB and a 0 below its LSB, and cut into R = ceil((N+1)/3)
// overlapping 4-bit groups (11 for N = 32); group k drives the select of the
// k-th 16:1 multiplexer (booth8_ppr_mux). Row k has weight 2^(3k):
//   X * Y = sum_k ppr[k] * 2^(3k)
// Purely combinational; it sits between the operand and row registers.
//
// Rows in exact two's complement and the SIGNED choice are this design's;
// the grouping, the 11 multiplexers and the 35-bit rows follow the design
// description.
module booth8_ppr_gen
  import radix8_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter bit          SIGNED = 1'b1,
  localparam int unsigned W     = ppr_width(N),
  localparam int unsigned R     = num_ppr(N)
) (
  input  logic [N-1:0] x,        // multiplicand
  input  logic [N-1:0] y,        // multiplier
  output logic [W-1:0] ppr [R]   // partial product rows, LSB row first
);

  // ---- multiples of X ----
  logic         xs, ys;
  logic [W-1:0] x1, x2, x3, x4;
  logic [W-1:0] n1, n2, n3, n4;

  assign xs = SIGNED ? x[N-1] : 1'b0;
  assign ys = SIGNED ? y[N-1] : 1'b0;
  assign x1 = {{3{xs}}, x};
  assign x2 = x1 << 1;
  assign x4 = x1 << 2;

  cla_adder #(.W(W)) u_x3 (.a(x1), .b(x2), .cin(1'b0), .sum(x3), .cout());

  cla_adder #(.W(W)) u_n1 (.a(~x1), .b('0), .cin(1'b1), .sum(n1), .cout());
  cla_adder #(.W(W)) u_n2 (.a(~x2), .b('0), .cin(1'b1), .sum(n2), .cout());
  cla_adder #(.W(W)) u_n3 (.a(~x3), .b('0), .cin(1'b1), .sum(n3), .cout());
  cla_adder #(.W(W)) u_n4 (.a(~x4), .b('0), .cin(1'b1), .sum(n4), .cout());

  // ---- multiplier groups ----
  // ye[0] = 0 (the appended LSB), ye[i+1] = y[i], extension bits above
  localparam int unsigned YW = 3 * R + 1;
  logic [YW-1:0] ye;
  assign ye = {{(YW - N - 1){ys}}, y, 1'b0};

  for (genvar k = 0; k < int'(R); k++) begin : g_row
    booth8_ppr_mux #(.W(W)) u_mux (
      .sel (ye[3*k +: 4]),
      .pos1(x1), .pos2(x2), .pos3(x3), .pos4(x4),
      .neg1(n1), .neg2(n2), .neg3(n3), .neg4(n4),
      .ppr (ppr[k])
    );
  end

endmodule
