// tb_path_setup: self-checking test of bus-line assignment and rerouting.
// Four path_setup instances: 4 x 4 one-sided, modified (g = 2) and ripple
// (K = 3), plus a 4-processor x 8-memory ripple switch (K = 2) where the
// processors are the partial side. Random requests go through a reference
// priority rule (lowest processor wins), and random crosspoints are marked
// faulty in about half of the cycles. Checks, for every instance:
//   - only winners are granted, each on a bus-line where both of its
//     crosspoints exist (per the topology rules) and are healthy, with no
//     bus-line used twice, and only the two rows of each connection active;
//   - with no faults every winner is granted (the switch is nonblocking);
//   - the number of connections is the largest any assignment of
//     bus-lines could reach (worked out here by exhaustive search), so a
//     winner is refused only when no rearrangement could serve it.
// It also counts connections that had to move off their preferred
// bus-line because of a fault (reroutes) and requires some.
module tb_path_setup;
  import xbar_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned NI = 4;
  int checks = 0, failures = 0;
  int reroutes = 0, refused = 0, granted_total = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned N = 4;
  localparam int unsigned MM [NI] = '{4, 4, 4, 8};
  localparam int unsigned MAXR = 12;

  req_t [N-1:0]            req;
  logic [N-1:0]            win [NI];
  logic [MAXR-1:0][3:0]    fault [NI];
  logic [N-1:0]            grant [NI];
  logic [MAXR-1:0]         row_act [NI];
  logic [MAXR-1:0][1:0]    row_bus [NI];

  for (genvar t = 0; t < NI; t++) begin : g_dut
    localparam int unsigned M = MM[t];
    path_setup #(.N(N), .M(M), .NB(4), .TOPO(t == 3 ? TOPO_RIPPLE : topo_of(t)), .G(2),
                 .K(t == 3 ? 2 : 3)) u_dut (
      .req(req), .win(win[t]), .xp_fault(fault[t][N+M-1:0]),
      .grant(grant[t]), .row_act(row_act[t][N+M-1:0]), .row_bus(row_bus[t][N+M-1:0]));
    if (N + M < MAXR) begin : g_pad
      assign row_act[t][MAXR-1:N+M] = '0;
      assign row_bus[t][MAXR-1:N+M] = '0;
    end
  end

  // Reference crosspoint rule, from the topology descriptions.
  function automatic bit has_xp(int t, int r, int b);
    if (t == 3) return (r < N) ? (((b - r + 4) % 4) < 2) : 1'b1;  // processors partial
    if (r < N) return 1'b1;
    return mem_mask4(topo_of(t), r - N)[b];
  endfunction
  function automatic int pref_bus(int t, int i, int j);
    if (t == 3) return i;
    if (t == 1) return (j < 2) ? 0 : 2;
    return j;
  endfunction

  // Largest number of winners that can be given distinct usable bus-lines
  // (exhaustive search over processors p.., with bus-lines in `taken` used).
  function automatic int max_conn(logic [N-1:0][3:0] use_m, int p, logic [3:0] taken);
    int best, v;
    if (p == N) return 0;
    best = max_conn(use_m, p + 1, taken);
    for (int b = 0; b < 4; b++)
      if (use_m[p][b] && !taken[b]) begin
        v = 1 + max_conn(use_m, p + 1, taken | (4'b1 << b));
        if (v > best) best = v;
      end
    return best;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    for (int t = 0; t < NI; t++) begin
      win[t] = '0;
      fault[t] = '0;
    end
    for (int it = 0; it < 1500; it++) begin
      bit with_faults;
      @(negedge clk);
      with_faults = ($urandom % 2) == 1;
      for (int i = 0; i < N; i++) begin
        req[i].valid = ($urandom % 4) != 0;
        req[i].write = 1'($urandom);
        req[i].mem   = MAX_MEM_W'($urandom % 8);
      end
      for (int t = 0; t < NI; t++) begin
        int M;
        M = int'(MM[t]);
        fault[t] = '0;
        if (with_faults)
          repeat (1 + $urandom % 3) fault[t][$urandom % (N + M)][$urandom % 4] = 1'b1;
        for (int i = 0; i < N; i++) begin
          win[t][i] = req[i].valid && int'(req[i].mem) < M;
          for (int h = 0; h < i; h++)
            if (req[h].valid && req[h].mem == req[i].mem) win[t][i] = 1'b0;
        end
      end
      #1;
      for (int t = 0; t < NI; t++) begin
        int M;
        logic [3:0] used;
        logic [MAXR-1:0] exp_act;
        M = int'(MM[t]);
        used = '0;
        exp_act = '0;
        for (int i = 0; i < N; i++) begin
          int j, b;
          j = int'(req[i].mem);
          if (grant[t][i]) begin
            b = int'(row_bus[t][i]);
            granted_total++;
            check(win[t][i], $sformatf("inst %0d: grant to loser %0d", t, i));
            check(row_act[t][i] && row_act[t][N+j] && int'(row_bus[t][N+j]) == b,
                  $sformatf("inst %0d: rows of connection %0d->%0d", t, i, j));
            check(has_xp(t, i, b) && has_xp(t, N + j, b),
                  $sformatf("inst %0d: bus %0d lacks a crosspoint for %0d->%0d", t, b, i, j));
            check(!fault[t][i][b] && !fault[t][N+j][b],
                  $sformatf("inst %0d: faulty crosspoint used by %0d->%0d", t, i, j));
            check(!used[b], $sformatf("inst %0d: bus %0d used twice", t, b));
            used[b] = 1'b1;
            exp_act[i] = 1'b1;
            exp_act[N+j] = 1'b1;
            if (b != pref_bus(t, i, j)) reroutes++;
          end else if (win[t][i]) begin
            refused++;
            check(with_faults, $sformatf("inst %0d: winner %0d refused without faults", t, i));
          end
        end
        begin
          logic [N-1:0][3:0] use_m;
          for (int i = 0; i < N; i++)
            for (int bb = 0; bb < 4; bb++)
              use_m[i][bb] = win[t][i] && has_xp(t, i, bb) && has_xp(t, N + int'(req[i].mem), bb)
                             && !fault[t][i][bb] && !fault[t][N + int'(req[i].mem)][bb];
          check($countones(grant[t]) == max_conn(use_m, 0, 4'b0),
                $sformatf("inst %0d: %0d connections, %0d possible", t, $countones(grant[t]),
                          max_conn(use_m, 0, 4'b0)));
        end
        check(row_act[t] == exp_act, $sformatf("inst %0d: row_act %b expected %b", t, row_act[t], exp_act));
      end
    end
    check(reroutes > 0, "no connection was rerouted around a fault");
    check(refused > 0, "no winner was refused for lack of a path");
    $display("granted=%0d rerouted=%0d refused=%0d", granted_total, reroutes, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
