// xbar_pkg: types and topology rules shared by the fault-tolerant crossbar.
//
// A one-sided crossbar has N processor port-lines and M memory port-lines
// crossing B bus-lines (B = min(N, M)). A connection uses two crosspoints on
// the same bus-line: one on the processor row, one on the memory row. The
// three topologies differ only in which crosspoints exist on the rows of the
// "partial" side (memories when N >= M, processors when M > N); the other
// side is always connected to every bus-line:
//   TOPO_ONE_SIDED : every partial-side row has all B crosspoints.
//   TOPO_MODIFIED  : the partial side is cut into G groups; group q uses only
//                    bus-lines q*B/G .. (q+1)*B/G-1.
//   TOPO_RIPPLE    : partial-side row j has K crosspoints on bus-lines
//                    j, j+1, .., j+K-1 (mod B), so the starting bus-line
//                    moves by one from row to row and wraps around.
// The rules and the crosspoint counts follow the paper; G = B gives the
// two-sided crossbar pattern and K = B or G = 1 the plain one-sided one.
// The request format (valid, write mode, module number) is this design's
// encoding of the paper's "read/write modes and requested memory module
// numbers".
package xbar_pkg;

  typedef enum logic [1:0] {
    TOPO_ONE_SIDED = 2'd0,
    TOPO_MODIFIED  = 2'd1,
    TOPO_RIPPLE    = 2'd2
  } topo_e;

  // Largest memory-module count the request format can name.
  localparam int unsigned MAX_MEM_W = 8;

  // One processor's request for one cycle.
  typedef struct packed {
    logic                 valid;  // processor requests a memory access
    logic                 write;  // 1 = write, 0 = read
    logic [MAX_MEM_W-1:0] mem;    // requested memory module number
  } req_t;

  function automatic int unsigned min_u(int unsigned a, int unsigned b);
    return (a < b) ? a : b;
  endfunction

  // Does a partial-side row `idx` (of `cnt` such rows) have a crosspoint on
  // bus-line `bus`?
  function automatic bit partial_xp(topo_e topo, int unsigned idx, int unsigned cnt,
                                    int unsigned bus, int unsigned nb,
                                    int unsigned g, int unsigned k);
    bit present;
    case (topo)
      TOPO_MODIFIED: present = (bus / (nb / g)) == (idx / (cnt / g));
      TOPO_RIPPLE:   present = ((bus + nb - (idx % nb)) % nb) < k;
      default:       present = 1'b1;
    endcase
    return present;
  endfunction

  // Does row `row` (0..n-1 processors, n..n+m-1 memories) have a crosspoint
  // on bus-line `bus`?
  function automatic bit xp_present(topo_e topo, int unsigned row, int unsigned bus,
                                    int unsigned n, int unsigned m, int unsigned nb,
                                    int unsigned g, int unsigned k);
    bit present;
    if (n >= m) present = (row < n) ? 1'b1 : partial_xp(topo, row - n, m, bus, nb, g, k);
    else        present = (row < n) ? partial_xp(topo, row, n, bus, nb, g, k) : 1'b1;
    return present;
  endfunction

  // Bus-line a partial-side row tries first: the first bus-line of its group
  // or of its ripple window.
  function automatic int unsigned first_bus(topo_e topo, int unsigned idx, int unsigned cnt,
                                            int unsigned nb, int unsigned g);
    int unsigned b;
    if (topo == TOPO_MODIFIED) b = (idx / (cnt / g)) * (nb / g);
    else                       b = idx % nb;
    return b;
  endfunction

  // Number of crosspoints: B(N + M) one-sided, B(N + M/g) modified,
  // BN + MK ripple (for N >= M; the roles swap if M > N).
  function automatic int unsigned xp_count(topo_e topo, int unsigned n, int unsigned m,
                                           int unsigned nb, int unsigned g, int unsigned k);
    int unsigned c;
    c = 0;
    for (int unsigned r = 0; r < n + m; r++)
      for (int unsigned b = 0; b < nb; b++)
        if (xp_present(topo, r, b, n, m, nb, g, k)) c++;
    return c;
  endfunction

endpackage
