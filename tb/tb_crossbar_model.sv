// tb_crossbar_model: self-checking test of complete crossbar switches
// (arbiter + switch) in the configurations the paper draws:
//   inst 0: 8 processors x 4 memories, modified, g = 2   (B = 4)
//   inst 1: 4 x 4 ripple, K = 3
//   inst 2: 4 x 4 modified, g = 4 (the two-sided pattern)
//   inst 3: 4 processors x 8 memories, ripple, K = 2 (processors partial)
// Each memory is modelled as a combinational function of its address, so
// read data can be predicted. Each cycle random requests (and, in some
// cycles, random faulty crosspoints) are applied; in the same cycle
// (the switch has zero latency) the testbench checks that grants match the
// lowest-processor-wins reference when nothing is faulty, and that every
// granted processor reaches exactly its memory: select, write mode,
// address, write data and returned read data. The crosspoint count of each
// instance is compared with the closed-form counts B(N + M/g), B(N + K),
// B(M + K).
module tb_crossbar_model;
  import xbar_pkg::*;
  localparam int unsigned NI = 4, AW = 16, DW = 32;
  localparam int unsigned NN [NI] = '{8, 4, 4, 4};
  localparam int unsigned MM [NI] = '{4, 4, 4, 8};
  localparam topo_e       TT [NI] = '{TOPO_MODIFIED, TOPO_RIPPLE, TOPO_MODIFIED, TOPO_RIPPLE};
  localparam int unsigned GG [NI] = '{2, 1, 4, 1};
  localparam int unsigned KK [NI] = '{1, 3, 1, 2};
  localparam int unsigned XPC [NI] = '{4 * (8 + 4 / 2), 4 * (4 + 3), 4 * (4 + 4 / 4), 4 * (8 + 2)};

  int checks = 0, failures = 0, done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  function automatic logic [DW-1:0] mem_word(int j, logic [AW-1:0] a);
    return (DW'(j + 1) * 32'h0100_0193) ^ DW'(a);
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

  for (genvar t = 0; t < NI; t++) begin : g_inst
    localparam int unsigned N = NN[t], M = MM[t], NB = (N < M) ? N : M;
    req_t [N-1:0]           req;
    logic [N+M-1:0][NB-1:0] fault;
    logic [N-1:0]           grant;
    logic [N-1:0][AW-1:0]   addr_p;
    logic [N-1:0][DW-1:0]   wdata_p, rdata_p;
    logic [M-1:0]           mem_sel, mem_we;
    logic [M-1:0][AW-1:0]   addr_m;
    logic [M-1:0][DW-1:0]   wdata_m, rdata_m;

    crossbar_model #(.N(N), .M(M), .TOPO(TT[t]), .G(GG[t]), .K(KK[t]), .ADDR_W(AW), .DATA_W(DW)) u_dut (
      .req(req), .xp_fault(fault), .grant(grant), .addr_p(addr_p), .wdata_p(wdata_p),
      .rdata_p(rdata_p), .mem_sel(mem_sel), .mem_we(mem_we), .addr_m(addr_m),
      .wdata_m(wdata_m), .rdata_m(rdata_m));

    always_comb for (int j = 0; j < M; j++) rdata_m[j] = mem_word(j, addr_m[j]);

    initial begin
      int granted;
      granted = 0;
      req = '0; fault = '0; addr_p = '0; wdata_p = '0;
      check(xp_count(TT[t], N, M, NB, GG[t], KK[t]) == XPC[t],
            $sformatf("inst %0d: crosspoint count %0d expected %0d", t,
                      xp_count(TT[t], N, M, NB, GG[t], KK[t]), XPC[t]));
      for (int it = 0; it < 1000; it++) begin
        logic [N-1:0] ref_win;
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          req[i].valid = ($urandom % 4) != 0;
          req[i].write = 1'($urandom);
          req[i].mem   = MAX_MEM_W'($urandom % M);
          addr_p[i]    = AW'($urandom);
          wdata_p[i]   = $urandom;
        end
        fault = '0;
        if ($urandom % 4 == 0) fault[$urandom % (N + M)][$urandom % NB] = 1'b1;
        for (int i = 0; i < N; i++) begin
          ref_win[i] = req[i].valid;
          for (int h = 0; h < i; h++)
            if (req[h].valid && req[h].mem == req[i].mem) ref_win[i] = 1'b0;
        end
        #1;
        if (fault == '0)
          check(grant == ref_win, $sformatf("inst %0d: grant %b expected %b", t, grant, ref_win));
        else
          check((grant & ~ref_win) == '0, $sformatf("inst %0d: grant to a loser", t));
        for (int j = 0; j < M; j++) begin
          int owner;
          owner = -1;
          for (int i = 0; i < N; i++) if (grant[i] && int'(req[i].mem) == j) owner = i;
          check(mem_sel[j] == (owner >= 0), $sformatf("inst %0d: mem_sel[%0d]", t, j));
          if (owner >= 0) begin
            granted++;
            check(mem_we[j] == req[owner].write, $sformatf("inst %0d: mem_we[%0d]", t, j));
            check(addr_m[j] == addr_p[owner], $sformatf("inst %0d: addr_m[%0d]", t, j));
            if (req[owner].write)
              check(wdata_m[j] == wdata_p[owner], $sformatf("inst %0d: wdata_m[%0d]", t, j));
            check(rdata_p[owner] == mem_word(j, addr_p[owner]),
                  $sformatf("inst %0d: rdata_p[%0d] from memory %0d", t, owner, j));
          end
        end
      end
      check(granted > 0, $sformatf("inst %0d: nothing granted", t));
      done++;
    end
  end

  initial begin
    wait (done == NI);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
