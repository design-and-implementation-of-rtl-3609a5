// tb_arbiter: self-checking test of the arbiter (priority_check +
// path_setup) for the three 4 x 4 topologies.
// Random requests, with random faulty crosspoints in a third of the cycles.
// Without faults the grants must equal the reference winners (lowest
// processor per requested module) in the same cycle; with faults every
// grant must still be a reference winner on a healthy, existing, unshared
// bus-line. Combinational: request -> grant in zero cycles.
module tb_arbiter;
  import xbar_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 4, M = 4, NB = 4;
  int checks = 0, failures = 0, conflicts = 0, fault_cycles = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  req_t [N-1:0]           req;
  logic [N+M-1:0][NB-1:0] fault;
  logic [N-1:0]           grant   [3];
  logic [N+M-1:0]         row_act [3];
  logic [N+M-1:0][1:0]    row_bus [3];

  for (genvar t = 0; t < 3; t++) begin : g_dut
    arbiter #(.N(N), .M(M), .NB(NB), .TOPO(topo_of(t)), .G(2), .K(3)) u_dut (
      .req(req), .xp_fault(fault), .grant(grant[t]), .row_act(row_act[t]), .row_bus(row_bus[t]));
  end

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
    req = '0; fault = '0;
    for (int it = 0; it < 1500; it++) begin
      logic [N-1:0] ref_win;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        req[i].valid = 1'($urandom);
        req[i].write = 1'($urandom);
        req[i].mem   = MAX_MEM_W'($urandom % M);
      end
      fault = '0;
      if ($urandom % 3 == 0) begin
        fault_cycles++;
        repeat (1 + $urandom % 2) fault[$urandom % (N + M)][$urandom % NB] = 1'b1;
      end
      for (int i = 0; i < N; i++) begin
        ref_win[i] = req[i].valid;
        for (int h = 0; h < i; h++)
          if (req[h].valid && req[h].mem == req[i].mem) begin
            ref_win[i] = 1'b0;
            if (req[i].valid) conflicts++;
          end
      end
      #1;
      for (int t = 0; t < 3; t++) begin
        logic [NB-1:0] used;
        used = '0;
        if (fault == '0)
          check(grant[t] == ref_win, $sformatf("topo %0d: grant %b expected %b", t, grant[t], ref_win));
        for (int i = 0; i < N; i++) begin
          if (grant[t][i]) begin
            int j, b;
            j = int'(req[i].mem);
            b = int'(row_bus[t][i]);
            check(ref_win[i], $sformatf("topo %0d: grant to loser %0d", t, i));
            check(row_act[t][N+j] && int'(row_bus[t][N+j]) == b, $sformatf("topo %0d: memory row %0d", t, j));
            check(mem_mask4(topo_of(t), j)[b], $sformatf("topo %0d: no crosspoint mem %0d bus %0d", t, j, b));
            check(!fault[i][b] && !fault[N+j][b], $sformatf("topo %0d: faulty crosspoint used", t));
            check(!used[b], $sformatf("topo %0d: bus %0d shared", t, b));
            used[b] = 1'b1;
          end
        end
      end
    end
    check(conflicts > 0 && fault_cycles > 0, "coverage");
    $display("conflicts=%0d fault cycles=%0d", conflicts, fault_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
