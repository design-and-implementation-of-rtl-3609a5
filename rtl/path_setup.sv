// path_setup: assigns a bus-line to every connection that won priority_check.
//
// A connection between processor i and memory j needs one bus-line b on
// which both rows have a crosspoint (xbar_pkg::xp_present), neither of the
// two crosspoints is marked faulty in xp_fault, and no other connection of
// this cycle uses b. Winners are served in processor order:
//   1. a winner takes the first free usable bus-line, trying its
//      partial-side row's first bus-line (group base for the modified
//      crossbar, own index for the ripple K crossbar) and going on from
//      there. Without faults this gives every memory its own bus-line, so
//      all winners are connected (the switch is nonblocking);
//   2. if none is free, it searches breadth-first for a chain of moves: it
//      takes a bus-line held by an earlier connection, which moves to
//      another of its usable bus-lines, and so on until one lands on a free
//      bus-line (an augmenting path). Earlier connections keep a bus-line,
//      possibly a different one.
// The result is a largest possible set of connections for the given faults,
// so a faulty crosspoint only costs a connection when no rearrangement of
// bus-lines can avoid it. This is the rerouting the fault-tolerant designs
// rely on; a winner left without a bus-line is not granted.
// Outputs, per port-line (rows 0..N-1 processors, N..N+M-1 memories):
// row_act (the row is connected) and row_bus (on which bus-line); grant is
// row_act of the processor rows. Purely combinational.
// The search order and method are this design's choices; the paper gives
// only the function ("arbitrating paths").
module path_setup
  import xbar_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned M    = 4,
  parameter int unsigned NB   = min_u(N, M),
  parameter topo_e       TOPO = TOPO_MODIFIED,
  parameter int unsigned G    = 2,
  parameter int unsigned K    = 3,
  localparam int unsigned BW  = (NB > 1) ? $clog2(NB) : 1
) (
  input  req_t [N-1:0]            req,
  input  logic [N-1:0]            win,
  input  logic [N+M-1:0][NB-1:0]  xp_fault,
  output logic [N-1:0]            grant,
  output logic [N+M-1:0]          row_act,
  output logic [N+M-1:0][BW-1:0]  row_bus
);
  localparam int unsigned R    = N + M;
  localparam int unsigned PCNT = (N >= M) ? M : N;  // rows on the partial side

  // Crosspoint map and first bus-line of each row, fixed at elaboration.
  typedef logic [R-1:0][NB-1:0] xp_map_t;
  typedef logic [R-1:0][BW-1:0] bus_map_t;

  function automatic xp_map_t build_xp_map();
    xp_map_t map;
    for (int unsigned r = 0; r < R; r++)
      for (int unsigned b = 0; b < NB; b++)
        map[r][b] = xp_present(TOPO, r, b, N, M, NB, G, K);
    return map;
  endfunction

  // First bus-line tried by a connection, indexed by processor row
  // (when M > N) or memory row (when N >= M).
  function automatic bus_map_t build_first_map();
    bus_map_t map;
    map = '0;
    for (int unsigned r = 0; r < R; r++) begin
      if (N >= M && r >= N) map[r] = BW'(first_bus(TOPO, r - N, PCNT, NB, G));
      if (N < M && r < N)   map[r] = BW'(first_bus(TOPO, r, PCNT, NB, G));
    end
    return map;
  endfunction

  localparam xp_map_t  XP_MAP    = build_xp_map();
  localparam bus_map_t FIRST_MAP = build_first_map();

  // Usable bus-lines of each processor's connection this cycle: both
  // crosspoints exist and neither is faulty.
  logic [N-1:0][NB-1:0] usable;

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned b = 0; b < NB; b++)
        usable[i][b] = win[i]
                       && XP_MAP[i][b] && XP_MAP[N + int'(req[i].mem)][b]
                       && !xp_fault[i][b] && !xp_fault[N + int'(req[i].mem)][b];
  end

  // The same sets by bus-line: col[c][q] = usable[q][c].
  logic [NB-1:0][N-1:0] col;

  always_comb begin
    for (int unsigned c = 0; c < NB; c++)
      for (int unsigned q = 0; q < N; q++)
        col[c][q] = usable[q][c];
  end

  // Index of the set bit of a one-hot vector.
  function automatic int unsigned oh_index(logic [N-1:0] oh);
    int unsigned idx;
    idx = 0;
    for (int unsigned q = 0; q < N; q++)
      if (oh[q]) idx = q;
    return idx;
  endfunction

  always_comb begin
    logic [N-1:0]               matched;    // connection i holds a bus-line
    logic [N-1:0][BW-1:0]       pbus;       // bus-line held by connection i
    logic [NB-1:0]              busy;       // bus-line held by some connection
    logic [NB-1:0][N-1:0]       owner;      // which connection holds it (one-hot)
    logic [NB-1:0][N-1:0]       parent;     // search tree: connection that reached it (one-hot)
    logic [NB-1:0]              vis_bus;
    logic [N-1:0]               vis_conn, frontier, next_frontier, cand;
    logic                       found, hit_ok, done;
    int unsigned                j, start, b, hit, p, prev;

    matched = '0;
    pbus    = '0;
    busy    = '0;
    owner   = '0;
    parent  = '0;
    vis_bus = '0;
    vis_conn = '0;
    frontier = '0;
    next_frontier = '0;
    cand    = '0;
    found   = 1'b0;
    hit_ok  = 1'b0;
    done    = 1'b0;
    j       = 0;
    start   = 0;
    b       = 0;
    hit     = 0;
    p       = 0;
    prev    = 0;

    for (int unsigned i = 0; i < N; i++) begin
      if (win[i]) begin
        // 1. take the first free usable bus-line, from the preferred one on
        // priority_check only lets requests with mem < M win
        j     = int'(req[i].mem);
        start = (N >= M) ? int'(FIRST_MAP[N + j]) : int'(FIRST_MAP[i]);
        found = 1'b0;
        for (int unsigned t = 0; t < NB; t++) begin
          b = start + t;
          if (b >= NB) b = b - NB;
          if (!found && !busy[b] && usable[i][b]) begin
            found      = 1'b1;
            busy[b]    = 1'b1;
            owner[b]   = N'(1) << i;
            matched[i] = 1'b1;
            pbus[i]    = BW'(b);
          end
        end

        // 2. otherwise look for a chain of moves: connection i takes a
        // bus-line held by another connection, which moves to another
        // usable bus-line, and so on until one ends on a free bus-line
        // (breadth-first over bus-lines, at most N levels; each level
        // handles the whole frontier of connections at once as a bit set).
        if (!found) begin
          vis_bus  = '0;
          vis_conn = N'(1) << i;
          frontier = N'(1) << i;
          hit_ok   = 1'b0;
          hit      = 0;
          for (int unsigned lvl = 0; lvl < N; lvl++) begin
            next_frontier = '0;
            for (int unsigned c = 0; c < NB; c++) begin
              cand = frontier & col[c];
              if (!hit_ok && !vis_bus[c] && (|cand)) begin
                vis_bus[c] = 1'b1;
                parent[c]  = cand & (~cand + N'(1));  // lowest-numbered one
                if (!busy[c]) begin
                  hit_ok = 1'b1;
                  hit    = c;
                end else begin
                  next_frontier = next_frontier | (owner[c] & ~vis_conn);
                end
              end
            end
            vis_conn = vis_conn | next_frontier;
            frontier = next_frontier;
          end

          // walk the chain back from the free bus-line to connection i
          if (hit_ok) begin
            b    = hit;
            done = 1'b0;
            busy[hit] = 1'b1;
            for (int unsigned step = 0; step < N; step++) begin
              if (!done) begin
                p          = oh_index(parent[b]);
                prev       = int'(pbus[p]);
                owner[b]   = parent[b];
                pbus[p]    = BW'(b);
                matched[p] = 1'b1;
                if (p == i) done = 1'b1;
                else        b    = prev;
              end
            end
          end
        end
      end
    end

    row_act = '0;
    row_bus = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (matched[i]) begin
        row_act[i]                         = 1'b1;
        row_bus[i]                         = pbus[i];
        row_act[N + int'(req[i].mem)]      = 1'b1;
        row_bus[N + int'(req[i].mem)]      = pbus[i];
      end
    end
    grant = matched;
  end
endmodule
