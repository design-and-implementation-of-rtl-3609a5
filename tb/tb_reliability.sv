// tb_reliability: survival probability and reliability of the
// fault-tolerant switches under random crosspoint faults.
// Six arbiters are exercised: 4 x 4 one-sided, modified (g = 2) and
// ripple (K = 2), and 8 x 8 one-sided, modified (g = 2) and ripple (K = 4).
// For i = 0 .. IMAX faulty crosspoints (chosen uniformly among the
// crosspoints that exist) and random full-load requests (p = 1), a trial
// succeeds when every request that wins its memory module is connected.
// Q(i) is the success rate over TRIALS trials; the reliability with
// crosspoint failure rate lambda = 0.01 per hour is then
//   R(t) = sum_i C(Nc, i) Rc^(Nc-i) (1 - Rc)^i Q(i),  Rc = exp(-lambda t),
// summed over every possible fault count (IMAX >= Nc), and the cost figure
// of merit is R(t)/Nc.
// Checks: Q(0) = 1 for every switch; a switch with more crosspoints per
// memory is at least as reliable (one-sided >= modified, ripple) at
// t = 10 h within a statistical margin; at t = 0.1 h the cheaper modified
// and ripple switches have the higher R/Nc; the 8 x 8 modified and ripple
// switches stay above 0.98 for the first ten hours, as the paper reports.
module tb_reliability;
  import xbar_pkg::*;
  localparam int unsigned NI = 6, IMAX = 128, TRIALS = 300;
  localparam int unsigned SZ [NI] = '{4, 4, 4, 8, 8, 8};
  localparam topo_e       TT [NI] = '{TOPO_ONE_SIDED, TOPO_MODIFIED, TOPO_RIPPLE,
                                      TOPO_ONE_SIDED, TOPO_MODIFIED, TOPO_RIPPLE};
  localparam int unsigned KK [NI] = '{1, 1, 2, 1, 1, 4};
  localparam real LAMBDA = 0.01;

  int checks = 0, failures = 0, done = 0;
  real q [NI][IMAX+1];
  int  nc [NI];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (NI * (IMAX + 1) * TRIALS * 2) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar t = 0; t < NI; t++) begin : g_inst
    localparam int unsigned N = SZ[t], M = SZ[t], NB = SZ[t];
    req_t [N-1:0]           req;
    logic [N+M-1:0][NB-1:0] fault;
    logic [N-1:0]           grant;
    logic [N+M-1:0]         row_act;
    logic [N+M-1:0][$clog2(NB)-1:0] row_bus;

    arbiter #(.N(N), .M(M), .NB(NB), .TOPO(TT[t]), .G(2), .K(KK[t])) u_dut (
      .req(req), .xp_fault(fault), .grant(grant), .row_act(row_act), .row_bus(row_bus));

    initial begin
      nc[t] = int'(xp_count(TT[t], N, M, NB, 2, KK[t]));
      req = '0;
      fault = '0;
      for (int i = 0; i <= IMAX; i++) begin
        int ok;
        ok = 0;
        for (int tr = 0; tr < TRIALS; tr++) begin
          logic [N-1:0] ref_win;
          @(negedge clk);
          fault = '0;
          if (i < nc[t])
            for (int f = 0; f < i; f++) begin
              int r, b;
              do begin
                r = int'($urandom % (N + M));
                b = int'($urandom % NB);
              end while (!xp_present(TT[t], r, b, N, M, NB, 2, KK[t]) || fault[r][b]);
              fault[r][b] = 1'b1;
            end
          for (int p = 0; p < N; p++) begin
            req[p].valid = 1'b1;
            req[p].write = 1'b0;
            req[p].mem   = MAX_MEM_W'($urandom % M);
            ref_win[p]   = 1'b1;
            for (int h = 0; h < p; h++) if (req[h].mem == req[p].mem) ref_win[p] = 1'b0;
          end
          #1;
          if (i < nc[t] && grant == ref_win) ok++;
        end
        q[t][i] = real'(ok) / real'(TRIALS);
      end
      check(q[t][0] == 1.0, $sformatf("switch %0d: Q(0) = %f", t, q[t][0]));
      done++;
    end
  end

  function automatic real rel(int t, real hours);
    real rc, s, lnc;
    rc  = $exp(-LAMBDA * hours);
    s   = 0.0;
    lnc = 0.0;  // ln C(Nc, i)
    for (int i = 0; i <= IMAX && i <= nc[t]; i++) begin
      if (i > 0) lnc += $ln(real'(nc[t] - i + 1)) - $ln(real'(i));
      s += $exp(lnc + real'(nc[t] - i) * $ln(rc) + ((i == 0) ? 0.0 : real'(i) * $ln(1.0 - rc))) * q[t][i];
    end
    return s;
  endfunction

  initial begin
    string name [NI] = '{"4x4 one-sided", "4x4 modified g=2", "4x4 ripple K=2",
                         "8x8 one-sided", "8x8 modified g=2", "8x8 ripple K=4"};
    real lt [6] = '{-1.0, 0.0, 0.5, 1.0, 1.5, 2.0};
    wait (done == NI);
    for (int t = 0; t < NI; t++) begin
      string line;
      line = $sformatf("%-18s Nc=%0d Q(1..4)=%0.3f %0.3f %0.3f %0.3f  R(t) at log t =", name[t], nc[t],
                       q[t][1], q[t][2], q[t][3], q[t][4]);
      foreach (lt[k]) line = {line, $sformatf(" %0.1f:%0.3f", lt[k], rel(t, 10.0 ** lt[k]))};
      $display("%s", line);
    end
    for (int s = 0; s < 2; s++) begin
      int o;
      o = 3 * s;
      for (int v = 1; v < 3; v++) begin
        check(rel(o, 10.0) >= rel(o + v, 10.0) - 0.03,
              $sformatf("%s less reliable than %s at 10 h", name[o], name[o + v]));
        check(rel(o + v, 0.1) / real'(nc[o + v]) > rel(o, 0.1) / real'(nc[o]),
              $sformatf("%s: R/Nc not above the one-sided switch at 0.1 h", name[o + v]));
      end
    end
    for (int v = 4; v < 6; v++)
      check(rel(v, 10.0) > 0.98, $sformatf("%s: R(10 h) = %0.3f", name[v], rel(v, 10.0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
