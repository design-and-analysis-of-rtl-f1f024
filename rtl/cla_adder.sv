// cla_adder: W-bit carry look-ahead adder, sum = a + b + cin.
//
// Bits are taken in 4-bit groups. Inside a group every carry is formed
// directly from the bit generate (a&b) and propagate (a^b) terms and the
// group's carry-in, as a two-level AND-OR look-ahead expression. Each group
// also forms a group generate and propagate, and the carry between groups is
// c(g+1) = G(g) | P(g) & c(g). W need not be a multiple of four; the top group
// is padded with zeros. Purely combinational.
//
// The multiplier uses this adder for every addition of partial product rows
// and for the 3X multiple; the group size of four is a choice of this design.
module cla_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = (W + 3) / 4;  // number of 4-bit groups
  localparam int unsigned WP = NG * 4;       // padded width

  logic [WP-1:0] ap, bp, g, p, c;
  logic [NG:0]   gc;  // carries into each group

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign g  = ap & bp;
  assign p  = ap ^ bp;

  always_comb begin
    logic          term;
    logic          gg, pg;
    logic [NG:0]   gcv;
    gcv    = '0;
    gcv[0] = cin;
    c      = '0;
    for (int grp = 0; grp < int'(NG); grp++) begin
      // look-ahead carries inside the group
      for (int i = 0; i < 4; i++) begin
        // carry into bit grp*4+i: OR of g[j] & p[j+1..i-1] for j < i,
        // and p[0..i-1] & group carry-in
        c[grp*4+i] = 1'b0;
        for (int j = 0; j < i; j++) begin
          term = g[grp*4+j];
          for (int m = j + 1; m < i; m++) term = term & p[grp*4+m];
          c[grp*4+i] = c[grp*4+i] | term;
        end
        term = gcv[grp];
        for (int m = 0; m < i; m++) term = term & p[grp*4+m];
        c[grp*4+i] = c[grp*4+i] | term;
      end
      // group generate / propagate
      gg = 1'b0;
      for (int j = 0; j < 4; j++) begin
        term = g[grp*4+j];
        for (int m = j + 1; m < 4; m++) term = term & p[grp*4+m];
        gg = gg | term;
      end
      pg = &p[grp*4 +: 4];
      gcv[grp+1] = gg | (pg & gcv[grp]);
    end
    gc = gcv;
  end

  logic [WP-1:0] sp;
  assign sp  = p ^ c;
  assign sum = sp[W-1:0];

  // carry out of bit W-1
  if (W == WP) begin : g_cout_full
    assign cout = gc[NG];
  end else begin : g_cout_pad
    assign cout = (g[W-1] | (p[W-1] & c[W-1]));
  end

endmodule
