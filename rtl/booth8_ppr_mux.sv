// booth8_ppr_mux: one radix-8 Booth selector, a 16:1 multiplexer.
//
// The 4-bit multiplier group sel = {y[3k+2], y[3k+1], y[3k], y[3k-1]} picks
// one of the precomputed multiples of the multiplicand as this partial
// product row. The Booth digit is -4*sel[3] + 2*sel[2] + sel[1] + sel[0]:
//
//   0000 -> 0    0001 -> +X   0010 -> +X   0011 -> +2X
//   0100 -> +2X  0101 -> +3X  0110 -> +3X  0111 -> +4X
//   1000 -> -4X  1001 -> -3X  1010 -> -3X  1011 -> -2X
//   1100 -> -2X  1101 -> -X   1110 -> -X   1111 -> 0
//
// Negative multiples arrive already in two's complement, so the row is the
// exact signed value digit*X. Purely combinational.
module booth8_ppr_mux #(
  parameter int unsigned W = 35   // partial product row width
) (
  input  logic [3:0]   sel,
  input  logic [W-1:0] pos1, pos2, pos3, pos4,   // +X, +2X, +3X, +4X
  input  logic [W-1:0] neg1, neg2, neg3, neg4,   // -X, -2X, -3X, -4X
  output logic [W-1:0] ppr
);

  always_comb begin
    unique case (sel)
      4'b0000: ppr = '0;
      4'b0001: ppr = pos1;
      4'b0010: ppr = pos1;
      4'b0011: ppr = pos2;
      4'b0100: ppr = pos2;
      4'b0101: ppr = pos3;
      4'b0110: ppr = pos3;
      4'b0111: ppr = pos4;
      4'b1000: ppr = neg4;
      4'b1001: ppr = neg3;
      4'b1010: ppr = neg3;
      4'b1011: ppr = neg2;
      4'b1100: ppr = neg2;
      4'b1101: ppr = neg1;
      4'b1110: ppr = neg1;
      default: ppr = '0;   // 4'b1111
    endcase
  end

endmodule
