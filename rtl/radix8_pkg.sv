// radix8_pkg: constants and helpers shared by the radix-8 Booth pipelined
// multiplier.
//
// A radix-8 modified Booth encoder scans the multiplier in overlapping 4-bit
// groups (Y[3k+2], Y[3k+1], Y[3k], Y[3k-1]) with Y[-1] = 0. Each group selects
// one multiple of the multiplicand from {0, +-1, +-2, +-3, +-4}, so an N-bit
// multiplier needs ceil((N+1)/3) partial product rows (11 for N = 32), each
// shifted three bits left of the previous one. A row is N+3 bits wide (35 for
// N = 32): wide enough for +-4X of a signed or unsigned N-bit multiplicand.
// The product is 2N bits.
package radix8_pkg;

  // Number of partial product rows for an n-bit multiplier. One extension bit
  // above the multiplier MSB is always scanned, so that unsigned operands work.
  function automatic int unsigned num_ppr(int unsigned n);
    return (n + 3) / 3;
  endfunction

  // Width of one partial product row for an n-bit multiplicand.
  function automatic int unsigned ppr_width(int unsigned n);
    return n + 3;
  endfunction

  // Signed Booth digit of a 4-bit group {y[3k+2], y[3k+1], y[3k], y[3k-1]}:
  // -4*g[3] + 2*g[2] + g[1] + g[0].
  function automatic int booth8_digit(logic [3:0] g);
    return -4 * int'(g[3]) + 2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
  endfunction

  // Plan of the tree adder (see ppr_tree_adder). Nodes 0..r-1 are the rows,
  // node r+k is the output of adder k. Each level pairs neighbouring nodes;
  // when a level has an odd count, the last node is added to the output of
  // the last pair of that level by one extra adder. r rows take r-1 adders.
  //   field 0: first (lower) source node of adder idx
  //   field 1: second (upper) source node of adder idx
  //   field 2: lowest row covered by node idx
  //   field 3: highest row covered by node idx
  function automatic int tree_plan(int r, int idx, int field);
    int cur [128];
    int nxt [128];
    int sa  [128];
    int sb  [128];
    int lo  [256];
    int hi  [256];
    int ncur, nn, id, cnt;
    if (idx < 0 || idx > 255 || r > 128) return -1;
    for (int i = 0; i < 256; i++) begin
      lo[i] = i;
      hi[i] = i;
    end
    for (int i = 0; i < 128; i++) begin
      cur[i] = i;
      nxt[i] = 0;
      sa[i]  = 0;
      sb[i]  = 0;
    end
    ncur = r;
    id   = r;
    cnt  = 0;
    while (ncur > 1) begin
      nn = 0;
      for (int i = 0; i + 1 < ncur; i += 2) begin
        sa[cnt] = cur[i];
        sb[cnt] = cur[i+1];
        lo[id]  = lo[cur[i]];
        hi[id]  = hi[cur[i+1]];
        nxt[nn] = id;
        nn++;
        id++;
        cnt++;
      end
      if (ncur % 2 == 1) begin
        sa[cnt] = nxt[nn-1];
        sb[cnt] = cur[ncur-1];
        lo[id]  = lo[nxt[nn-1]];
        hi[id]  = hi[cur[ncur-1]];
        nxt[nn-1] = id;
        id++;
        cnt++;
      end
      for (int i = 0; i < nn; i++) cur[i] = nxt[i];
      ncur = nn;
    end
    case (field)
      0:       return sa[idx];
      1:       return sb[idx];
      2:       return lo[idx];
      default: return hi[idx];
    endcase
  endfunction

endpackage
